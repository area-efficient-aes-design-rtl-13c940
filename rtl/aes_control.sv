// aes_control: control unit of the 8-bit AES-128 encryption core.
//
// A phase register, a 4-bit cycle counter, a column counter and a round
// counter sequence one encryption (cycles counted from the first load cycle):
//   LOAD   16  plaintext byte i XOR key byte i enters RS15 (first
//              Add-Round-Key merged with loading); key byte i enters K15.
//   then, for rounds 1..9:
//   SROWS   1  Shift-Rows inside the state register.
//   FEED    4  column 0 (RS0..RS3) leaves through the S-box into Mix-Columns
//              while the whole state shifts by one column.
//   STORE   4  Mix-Columns bytes XOR the new round-key bytes enter the last
//              column only; the key register advances one byte per cycle.
//              FEED/STORE repeat for four columns (32 cycles). In the STORE
//              of column 0 the shared S-box serves the key register.
//   and for round 10:
//   SROWS   1, KPRE 4 (S-box on the key word; bytes parked in RM0..RM3),
//   LAST   16  S-box byte XOR round-key byte enters RS15.
// Total 16 + 9*33 + 21 = 334 cycles; `done` is a registered one-cycle pulse
// in the cycle after the last one. The first round ends 49 cycles after the
// first load cycle, as in the design's state-register schedule. The KPRE
// phase is this implementation's way of sharing the single S-box in the last
// round, where every state cycle needs it.
//
// `start` is taken only in IDLE. When `en` is low every enable is dropped
// and the sequence stands still (the whole core is clock-gated). Outputs
// are decoded from the registered phase and counters (Moore outputs).
module aes_control
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       start,
  output cs_t        cs,
  output din_sel_e   din_sel,
  output logic [3:0] byte_idx,
  output logic       key_shift,
  output logic       key_load,
  output key_tap_e   key_tap,
  output logic       sbox_key,
  output logic       ksub_from_rm,
  output logic       key_first_word,
  output logic       rcon_init,
  output logic       rcon_step,
  output logic       rcon_apply,
  output logic       mc_collect,
  output logic       mc_rotate,
  output logic       busy,
  output logic       done
);
  phase_e     phase;
  logic [3:0] cnt;
  logic [1:0] col;
  logic [3:0] round;

  // ---------------------------------------------------------------- sequence
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      cnt   <= '0;
      col   <= '0;
      round <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (en) begin
        unique case (phase)
          PH_IDLE: if (start) begin
            phase <= PH_LOAD;
            cnt   <= '0;
            round <= 4'd1;
          end
          PH_LOAD: begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd15) phase <= PH_SROWS;
          end
          PH_SROWS: begin
            cnt   <= '0;
            col   <= '0;
            phase <= (round == 4'(NUM_ROUNDS)) ? PH_KPRE : PH_FEED;
          end
          PH_FEED: begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd3) begin
              cnt   <= '0;
              phase <= PH_STORE;
            end
          end
          PH_STORE: begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd3) begin
              cnt <= '0;
              col <= col + 2'd1;
              if (col == 2'd3) begin
                round <= round + 4'd1;
                phase <= PH_SROWS;
              end else begin
                phase <= PH_FEED;
              end
            end
          end
          PH_KPRE: begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd3) begin
              cnt   <= '0;
              phase <= PH_LAST;
            end
          end
          PH_LAST: begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd15) begin
              phase <= PH_IDLE;
              done  <= 1'b1;
            end
          end
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

  // ----------------------------------------------------------------- decode
  always_comb begin
    cs             = CS_HOLD;
    din_sel        = DSEL_LOAD;
    byte_idx       = cnt;
    key_shift      = 1'b0;
    key_load       = 1'b0;
    key_tap        = KTAP_K13;
    sbox_key       = 1'b0;
    ksub_from_rm   = 1'b0;
    key_first_word = 1'b0;
    rcon_init      = 1'b0;
    rcon_step      = 1'b0;
    rcon_apply     = 1'b0;
    mc_collect     = 1'b0;
    mc_rotate      = 1'b0;
    unique case (phase)
      PH_IDLE: rcon_init = start;
      PH_LOAD: begin
        cs        = CS_SHIFT_ALL;
        din_sel   = DSEL_LOAD;
        key_shift = 1'b1;
        key_load  = 1'b1;
      end
      PH_SROWS: cs = CS_SHIFT_ROWS;
      PH_FEED: begin
        cs         = CS_SHIFT_ALL;
        mc_collect = 1'b1;
      end
      PH_STORE: begin
        cs             = CS_STORE_COL;
        din_sel        = DSEL_MIX;
        mc_rotate      = 1'b1;
        key_shift      = 1'b1;
        key_first_word = (col == 2'd0);
        sbox_key       = (col == 2'd0);
        key_tap        = (cnt == 4'd3) ? KTAP_K9 : KTAP_K13;
        rcon_apply     = (col == 2'd0) && (cnt == 4'd0);
        rcon_step      = (col == 2'd3) && (cnt == 4'd3);
      end
      PH_KPRE: begin
        cs         = CS_HOLD;
        sbox_key   = 1'b1;
        mc_collect = 1'b1;
        unique case (cnt[1:0])
          2'd0:    key_tap = KTAP_K13;
          2'd1:    key_tap = KTAP_K14;
          2'd2:    key_tap = KTAP_K15;
          default: key_tap = KTAP_K12;
        endcase
      end
      PH_LAST: begin
        cs             = CS_SHIFT_ALL;
        din_sel        = DSEL_SBOX;
        key_shift      = 1'b1;
        ksub_from_rm   = 1'b1;
        key_first_word = (cnt < 4'd4);
        mc_rotate      = (cnt < 4'd4);
        rcon_apply     = (cnt == 4'd0);
      end
      default: ;
    endcase
    // EN low: nothing may change anywhere in the core.
    if (!en) begin
      cs         = CS_HOLD;
      key_shift  = 1'b0;
      rcon_init  = 1'b0;
      rcon_step  = 1'b0;
      mc_collect = 1'b0;
      mc_rotate  = 1'b0;
    end
  end

  assign busy = (phase != PH_IDLE);

  // Only the three working codes or hold ever reach the state register.
  a_cs_legal: assert property (@(posedge clk) disable iff (!rst_n)
    (cs == CS_SHIFT_ALL) || (cs == CS_SHIFT_ROWS) || (cs == CS_STORE_COL) ||
    (cs == CS_HOLD));
  // The S-box serves one client at a time: never the key during a state feed.
  a_sbox_owner: assert property (@(posedge clk) disable iff (!rst_n)
    sbox_key |-> (phase != PH_FEED) && (phase != PH_LAST));
endmodule
