// tb_aes_control: runs the control unit through whole encryptions and
// counts, per enabled busy cycle, every control output. The expected counts
// follow from the schedule (16 load cycles; 9 rounds of Shift-Rows plus four
// 4-cycle feeds and four 4-cycle stores; a last round of Shift-Rows, 4 key
// S-box cycles and 16 shift cycles): 334 busy cycles, Shift-Rows at busy
// cycles 16 + 33k, the first round done at cycle 49, etc. It also checks in
// which cycle of each round the round constant is applied and the S-box
// serves the key, and with which tap. The second run drops EN at random and
// repeats Drdy while busy; the counts must not change.
module tb_aes_control;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0;
  cs_t cs;
  din_sel_e din_sel;
  logic [3:0] byte_idx;
  logic key_shift, key_load, sbox_key, ksub_from_rm, key_first_word;
  logic rcon_init, rcon_step, rcon_apply, mc_collect, mc_rotate, busy, done;
  key_tap_e key_tap;
  int checks = 0, failures = 0;

  aes_control dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input bit stress);
    int n_busy, n_all, n_rows, n_store, n_hold, n_kshift, n_kload, n_sbk;
    int n_rapp, n_rstep, n_coll, n_rot, n_mix, n_sbox, n_frozen, first_rows, idx_err;
    int rows_seen;
    int n_pos_err = 0;
    n_busy = 0; n_all = 0; n_rows = 0; n_store = 0; n_hold = 0; n_kshift = 0;
    n_kload = 0; n_sbk = 0; n_rapp = 0; n_rstep = 0; n_coll = 0; n_rot = 0;
    n_mix = 0; n_sbox = 0; n_frozen = 0; idx_err = 0; rows_seen = 0; first_rows = -1;
    @(negedge clk);
    start = 1;
    #1 chk(int'(rcon_init), 1, "rcon_init with start");
    @(negedge clk);
    start = 0;
    while (busy) begin
      if (stress) begin
        en = ($urandom_range(0, 3) != 0);
        start = 1'($urandom);
      end
      #1;
      if (!en) begin
        if (cs != CS_HOLD || key_shift || mc_collect || mc_rotate || rcon_step) n_frozen++;
      end else begin
        if (cs == CS_SHIFT_ROWS) begin
          if (n_busy != 16 + 33 * rows_seen) idx_err++;
          rows_seen++;
        end
        n_all    += int'(cs == CS_SHIFT_ALL);
        n_rows   += int'(cs == CS_SHIFT_ROWS);
        n_store  += int'(cs == CS_STORE_COL);
        n_hold   += int'(cs == CS_HOLD);
        n_kshift += int'(key_shift);
        n_kload  += int'(key_load);
        n_sbk    += int'(sbox_key);
        n_rapp   += int'(rcon_apply);
        n_rstep  += int'(rcon_step);
        n_coll   += int'(mc_collect);
        n_rot    += int'(mc_rotate);
        n_mix    += int'(cs == CS_STORE_COL && din_sel == DSEL_MIX);
        n_sbox   += int'(din_sel == DSEL_SBOX);
        // Position of the key-path controls within the round.
        if (n_busy >= 16) begin
          int rel;
          bit exp_apply, exp_sbk;
          key_tap_e exp_tap;
          exp_tap = KTAP_K13;
          if (n_busy < 16 + 9 * 33) begin
            rel = (n_busy - 16) % 33;
            exp_apply = (rel == 5);
            exp_sbk = (rel >= 5 && rel <= 8);
            if (rel == 8) exp_tap = KTAP_K9;
          end else begin
            rel = n_busy - (16 + 9 * 33);
            exp_apply = (rel == 5);
            exp_sbk = (rel >= 1 && rel <= 4);
            case (rel)
              2: exp_tap = KTAP_K14;
              3: exp_tap = KTAP_K15;
              4: exp_tap = KTAP_K12;
              default: exp_tap = KTAP_K13;
            endcase
          end
          if (rcon_apply != exp_apply || sbox_key != exp_sbk || (exp_sbk && key_tap != exp_tap))
            n_pos_err++;
        end
        n_busy++;
      end
      @(negedge clk);
      if (!busy) begin
        chk(int'(done), 1, "done pulse after last cycle");
      end
    end
    en = 1;
    start = 0;
    chk(n_busy, ENC_CYCLES, "busy cycles");
    chk(n_all, 176, "shift-all cycles");
    chk(n_rows, 10, "shift-rows cycles");
    chk(idx_err, 0, "shift-rows positions");
    chk(n_store, 144, "store-column cycles");
    chk(n_hold, 4, "hold cycles");
    chk(n_kshift, 176, "key shifts");
    chk(n_kload, 16, "key loads");
    chk(n_sbk, 40, "S-box given to key");
    chk(n_rapp, 10, "rcon applied");
    chk(n_rstep, 9, "rcon steps");
    chk(n_coll, 148, "Mix-Columns collects");
    chk(n_rot, 148, "Mix-Columns rotates");
    chk(n_mix, 144, "Mix-Columns bytes stored");
    chk(n_sbox, 16, "last-round bytes");
    chk(n_frozen, 0, "enables while EN low");
    chk(n_pos_err, 0, "rcon / key S-box positions");
    @(negedge clk);
    chk(int'(done), 0, "done is one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
    run(0);
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
