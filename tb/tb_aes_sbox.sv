// tb_aes_sbox: exhaustive check of the composite-field S-box against the
// reference S-box (GF(2^8) inverse by search plus affine map), and against
// four published table entries. Combinational, 260 checks.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] a, s;
  int checks = 0, failures = 0;

  aes_sbox dut (.a, .s);

  task automatic check(input logic [7:0] in, input logic [7:0] exp);
    a = in;
    #1;
    checks++;
    if (s !== exp) begin
      failures++;
      $display("S(%h) = %h, expected %h", in, s, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) check(8'(v), ref_sbox(8'(v)));
    check(8'h00, 8'h63);
    check(8'h01, 8'h7c);
    check(8'h53, 8'hed);
    check(8'hff, 8'h16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
