// tb_aes_key_register: loads random keys byte by byte and checks the taps
// (out1 = K0, k12 = K12, out2 = the tapped byte) against a queue model
// after every cycle, with shift randomly dropped to check hold. It also runs
// one full round-key update the way the core does (new byte = K0 ^ ...,
// written back into K15) using the reference S-box, and compares the 16
// bytes read from out1 in the next round with the reference key expansion.
module tb_aes_key_register;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [7:0] din = 0, out1, k12, out2;
  key_tap_e tap = KTAP_K13;
  logic [7:0] m [16];
  int checks = 0, failures = 0;

  aes_key_register dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [7:0] tapped(input key_tap_e t);
    case (t)
      KTAP_K9:  return m[9];
      KTAP_K12: return m[12];
      KTAP_K13: return m[13];
      KTAP_K14: return m[14];
      default:  return m[15];
    endcase
  endfunction

  initial begin
    logic [127:0] key, nk, got;
    for (int i = 0; i < 16; i++) m[i] = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Random traffic against the model.
    for (int n = 0; n < 1000; n++) begin
      shift = 1'($urandom);
      din = 8'($urandom);
      tap = key_tap_e'($urandom_range(0, 4));
      @(negedge clk);
      if (shift) begin
        for (int i = 0; i < 15; i++) m[i] = m[i + 1];
        m[15] = din;
      end
      chk(out1, m[0], "out1");
      chk(k12, m[12], "k12");
      chk(out2, tapped(tap), "out2");
    end
    // One round of on-the-fly expansion, as the core sequences it.
    key = {$urandom, $urandom, $urandom, $urandom};
    shift = 1;
    for (int i = 0; i < 16; i++) begin
      din = ref_byte(key, i);
      @(negedge clk);
    end
    for (int i = 0; i < 16; i++) begin
      tap = (i == 3) ? KTAP_K9 : KTAP_K13;
      #1;
      if (i < 4) din = out1 ^ ref_sbox(out2) ^ ((i == 0) ? 8'h01 : 8'h00);
      else       din = out1 ^ k12;
      @(negedge clk);
    end
    nk = ref_next_key(key, 0);
    shift = 1;
    for (int i = 0; i < 16; i++) begin
      got[127 - 8 * i -: 8] = out1;
      din = out1;
      @(negedge clk);
    end
    chk(got[127:120], nk[127:120], "expanded byte 0");
    checks++;
    if (got !== nk) begin
      failures++;
      $display("round key 1: got %h expected %h", got, nk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
