// tb_nano_aes: end-to-end test of the top level at its default (and only)
// configuration. It loads keys with Krdy (checking the Kvld pulse), encrypts
// several blocks per key without reloading it, and compares every
// ciphertext with the reference model; the FIPS-197 example comes first.
// While the core is busy it also raises Drdy and Krdy with other values
// (both must be ignored) and drops EN at random (the result must not
// change). It counts how often each mechanism of the design happened and
// fails any that never did: Shift-Rows in the state register, Mix-Columns
// column stores, last-round bytes without Mix-Columns, the shared S-box
// serving the key expansion, cycles in which state-register groups are
// clock-gated, EN stalls, ignored Drdy and ignored Krdy, and
// key reuse across blocks.
module tb_nano_aes;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic CLK = 0, RSTn, EN = 1, Krdy = 0, Drdy = 0;
  logic [127:0] Kin = '0, Din = '0, Dout;
  logic BSY, Dvld, Kvld, sel;
  int checks = 0, failures = 0;

  // Give the asynchronous reset a real falling edge: gated registers see no
  // clock while they hold, so only the edge resets them.
  initial begin
    RSTn = 1;
    #1 RSTn = 0;
  end
  int n_srows = 0, n_store = 0, n_last = 0, n_sbox_key = 0, n_stall = 0;
  int n_gated = 0;
  int n_drdy_ignored = 0, n_krdy_ignored = 0, n_key_reuse = 0, n_blocks = 0;

  nano_aes dut (.*);

  always #5 CLK = ~CLK;

  // Mechanism counters, sampled once per cycle from the core's controls.
  always @(posedge CLK) if (RSTn && EN) begin
    n_srows    += int'(dut.u_core.u_ctrl.cs == CS_SHIFT_ROWS);
    n_store    += int'(dut.u_core.u_ctrl.cs == CS_STORE_COL);
    n_last     += int'(dut.u_core.u_ctrl.din_sel == DSEL_SBOX);
    n_sbox_key += int'(sel);
  end
  always @(posedge CLK) if (RSTn && BSY && !EN) n_stall++;
  // Cycles in which at least one state-register group received no clock.
  always @(posedge CLK) if (RSTn && BSY && dut.u_core.u_state.grp_en != 4'hf) n_gated++;

  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_key(input logic [127:0] key);
    @(negedge CLK);
    Kin = key;
    Krdy = 1;
    @(negedge CLK);
    Krdy = 0;
    Kin = ~key;  // the held copy must be used from now on
    chk(128'(Kvld), 128'(1), "Kvld after Krdy");
    @(negedge CLK);
    chk(128'(Kvld), 128'(0), "Kvld is one cycle");
  endtask

  task automatic encrypt(input logic [127:0] pt, input logic [127:0] key, input bit noise);
    int guard = 0;
    int busy_cycles = 0;
    @(negedge CLK);
    Din = pt;
    Drdy = 1;
    @(negedge CLK);
    Drdy = 0;
    chk(128'(BSY), 128'(1), "BSY after Drdy");
    while (!Dvld && guard < 5000) begin
      if (noise && busy_cycles > 20) begin
        EN = ($urandom_range(0, 3) != 0);
        if ($urandom_range(0, 40) == 0) begin
          Drdy = 1;
          n_drdy_ignored++;
        end else Drdy = 0;
        if ($urandom_range(0, 40) == 0) begin
          Krdy = 1;
          Kin = {$urandom, $urandom, $urandom, $urandom};
          n_krdy_ignored++;
        end else Krdy = 0;
      end
      @(negedge CLK);
      busy_cycles++;
      guard++;
      if (busy_cycles > 16) Din = {$urandom, $urandom, $urandom, $urandom};
    end
    EN = 1;
    Drdy = 0;
    Krdy = 0;
    chk(Dout, ref_encrypt(pt, key), "ciphertext");
    chk(128'(BSY), 128'(0), "BSY low with Dvld");
    n_blocks++;
  endtask

  initial begin
    logic [127:0] key;
    repeat (2) @(negedge CLK);
    RSTn = 1;
    @(negedge CLK);
    chk(128'(BSY), 128'(0), "idle after reset");
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 0);
    chk(Dout, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1");
    for (int k = 0; k < 3; k++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      load_key(key);
      for (int b = 0; b < 3; b++) begin
        if (b > 0) n_key_reuse++;
        encrypt({$urandom, $urandom, $urandom, $urandom}, key, b != 0);
      end
    end
    // Every mechanism must have happened.
    chk(128'(n_srows == 10 * n_blocks), 128'(1), "Shift-Rows once per round");
    chk(128'(n_store == 144 * n_blocks), 128'(1), "Mix-Columns stores");
    chk(128'(n_last == 16 * n_blocks), 128'(1), "last-round bytes");
    chk(128'(n_sbox_key == 40 * n_blocks), 128'(1), "S-box shared with key expansion");
    chk(128'(n_stall > 0), 128'(1), "EN stalls");
    chk(128'(n_gated > 0), 128'(1), "state-register clock gating");
    chk(128'(n_drdy_ignored > 0), 128'(1), "Drdy while busy");
    chk(128'(n_krdy_ignored > 0), 128'(1), "Krdy while busy");
    chk(128'(n_key_reuse > 0), 128'(1), "key reused");
    $display("blocks=%0d shift_rows=%0d mix_stores=%0d last_bytes=%0d key_sbox=%0d stalls=%0d gated=%0d drdy_ignored=%0d krdy_ignored=%0d key_reuse=%0d",
             n_blocks, n_srows, n_store, n_last, n_sbox_key, n_stall, n_gated, n_drdy_ignored,
             n_krdy_ignored, n_key_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
