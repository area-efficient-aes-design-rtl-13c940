// tb_aes_composite_enc: encrypts the two FIPS-197 example blocks and random
// blocks with the 8-bit core and compares with the reference model. Besides
// the ciphertext it checks the schedule: 16 cycles after the start edge the
// state must equal plaintext XOR key, and every 33 cycles after that it must
// equal the reference state after round 1, 2, ... 9 (round 1 therefore ends
// 49 cycles after the start edge). In between, the state must equal the
// shifted rows 17 cycles after the start edge, and the first finished column
// of round 1 must sit in RS12..RS15 eight cycles later. Dvld must rise
// exactly 334 cycles after the start edge and last one cycle. Some blocks
// are run with EN dropped at random, which must only stretch the run.
module tb_aes_composite_enc;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, RSTn, EN = 1, Drdy = 0;
  logic [127:0] Din = '0, Kin = '0, Dout;
  logic BSY, Dvld, sel;
  int checks = 0, failures = 0;

  // Give the asynchronous reset a real falling edge: gated registers see no
  // clock while they hold, so only the edge resets them.
  initial begin
    RSTn = 1;
    #1 RSTn = 0;
  end

  aes_composite_enc dut (.CLK(clk), .RSTn, .EN, .Din, .Kin, .Drdy, .Dout, .BSY, .Dvld, .sel);

  always #5 clk = ~clk;

  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic encrypt(input logic [127:0] pt, input logic [127:0] key, input bit stall);
    int active;
    int guard;
    @(negedge clk);
    Din = pt;
    Kin = key;
    Drdy = 1;
    @(negedge clk);  // start edge has passed
    Drdy = 0;
    active = 0;
    guard = 0;
    while (!Dvld && guard < 5000) begin
      if (stall && active > 16) EN = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (EN) active++;
      #1;
      if (EN && active == 16) chk(Dout, pt ^ key, "after load / first Add-Round-Key");
      if (EN && active == 17) chk(Dout, ref_shift_rows(pt ^ key), "after first Shift-Rows");
      if (EN && active == 25)  // first column of round 1 stored in RS12..RS15
        chk(128'(Dout[31:0]), 128'(ref_encrypt_rounds(pt, key, 1) >> 96),
            "round 1 column 0 in RS12..RS15");
      if (EN && active > 16 && active < 16 + 9 * 33 + 1 && (active - 16) % 33 == 0)
        chk(Dout, ref_encrypt_rounds(pt, key, (active - 16) / 33),
            $sformatf("state after round %0d", (active - 16) / 33));
      guard++;
    end
    EN = 1;
    // active counts the edges after the start edge; the last one raised Dvld.
    chk(128'(active), 128'(ENC_CYCLES), "cycles from start edge to Dvld");
    chk(Dout, ref_encrypt(pt, key), "ciphertext");
    @(posedge clk);
    #1;
    chk(128'(Dvld), 128'(0), "Dvld lasts one cycle");
    chk(Dout, ref_encrypt(pt, key), "Dout holds");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    RSTn = 1;
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 0);
    chk(Dout, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1");
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 0);
    chk(Dout, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B");
    for (int n = 0; n < 6; n++)
      encrypt({$urandom, $urandom, $urandom, $urandom},
              {$urandom, $urandom, $urandom, $urandom}, n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
