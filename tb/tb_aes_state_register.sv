// tb_aes_state_register: drives the state register with random bytes and
// random control words and compares all 16 bytes after every cycle with a
// byte-array model of the three modes (shift all, Shift-Rows, shift only
// the last column) and hold for every other code. It also checks, as in
// the design's schedule, that 16 loads put the first byte in RS0, that one
// Shift-Rows cycle equals the reference ShiftRows, and that after four
// shift-all cycles and four store-column cycles the stored bytes sit in
// RS12..RS15 in order.
module tb_aes_state_register;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n;
  cs_t cs = CS_HOLD;
  logic [7:0] din = 0, rs0;
  logic [127:0] state;
  logic [7:0] m [16];
  int checks = 0, failures = 0;

  // Give the asynchronous reset a real falling edge: gated registers see no
  // clock while they hold, so only the edge resets them.
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
  end

  aes_state_register dut (.*);

  always #5 clk = ~clk;

  function automatic logic [127:0] model_vec();
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8 * i -: 8] = m[i];
    return v;
  endfunction

  // One clock of the model.
  task automatic model_step(input cs_t c, input logic [7:0] d);
    logic [7:0] o [16];
    o = m;
    if (c == 4'b1111) begin
      for (int i = 0; i < 15; i++) o[i] = m[i + 1];
      o[15] = d;
    end else if (c == 4'b1100) begin
      for (int col = 0; col < 4; col++)
        for (int r = 1; r < 4; r++) o[4 * col + r] = m[4 * ((col + r) % 4) + r];
    end else if (c == 4'b1110) begin
      o[12] = m[13]; o[13] = m[14]; o[14] = m[15]; o[15] = d;
    end
    m = o;
  endtask

  task automatic cycle(input cs_t c, input logic [7:0] d);
    cs = c;
    din = d;
    @(negedge clk);
    model_step(c, d);
    checks++;
    if (state !== model_vec() || rs0 !== m[0]) begin
      failures++;
      $display("cs=%b: state %h expected %h", c, state, model_vec());
    end
  endtask

  task automatic check_vec(input logic [127:0] exp, input string what);
    checks++;
    if (state !== exp) begin
      failures++;
      $display("%s: state %h expected %h", what, state, exp);
    end
  endtask

  initial begin
    logic [127:0] blk, sr;
    for (int i = 0; i < 16; i++) m[i] = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Load: byte 0 first ends in RS0.
    blk = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 16; i++) cycle(CS_SHIFT_ALL, ref_byte(blk, i));
    check_vec(blk, "load");
    // Shift-Rows in one cycle.
    cycle(CS_SHIFT_ROWS, 8'h00);
    sr = ref_shift_rows(blk);
    check_vec(sr, "shift rows");
    // One column through Mix-Columns: 4 shift-all, 4 store-column.
    for (int i = 0; i < 4; i++) cycle(CS_SHIFT_ALL, 8'hee);
    for (int i = 0; i < 4; i++) cycle(CS_STORE_COL, 8'(8'hb0 + i));
    check_vec({sr[95:0], 32'hb0b1b2b3}, "column stored in RS12..RS15");
    // Random control words, including the codes that must hold.
    for (int n = 0; n < 2000; n++) cycle(4'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
