// aes_state_register: the 16-byte AES state, RS0..RS15, with Shift-Rows
// built into its wiring.
//
// Byte RS(4c+r) holds row r of column c (column-major, RS0 is row 0 of
// column 0). The register is steered by the four control signals
// cs = {CS3, CS2, CS1, CS0}:
//   1111  shift all: RS(i) <- RS(i+1), RS15 <- din. Used to load the
//         plaintext, for the first and last Add-Round-Key and to feed a
//         column to Mix-Columns (RS0..RS3 leave through rs0, one per cycle).
//   1100  Shift-Rows in one cycle: row r rotates left by r columns, row 0
//         holds.
//   1110  store column: only the last column shifts (RS12 <- RS13 <- RS14
//         <- RS15 <- din); columns 0..2 hold.
//   other hold.
// These three codes and their effect are the design's; the treatment of the
// remaining codes is this implementation's choice. Each register has at most
// a 2:1 input mux (shift neighbour or Shift-Rows neighbour).
//
// Clock gating: the registers fall into four groups by the modes in which
// they change (row 0 of columns 0..2; rows 1..3 of columns 0..2; RS12;
// RS13..RS15). Each group has one enable decoded from CS and its own clock
// gate (aes_clock_gate), so a group that does not change in a cycle gets no
// clock edge at all: during a column store 12 of the 16 bytes are unclocked,
// during Shift-Rows 4, and while the state holds all 16.
//
// Timing: all groups are clocked from clk through their gates and change on
// its rising edge; asynchronous active-low reset to zero. `state`
// shows all 16 bytes (RS0 in bits 127:120) for the parallel output.
module aes_state_register
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  cs_t          cs,
  input  byte_t        din,
  output byte_t        rs0,
  output logic [127:0] state
);
  byte_t rs [16];
  byte_t nxt [16];
  logic  m_shift, m_rows, m_store;
  logic  en_r0, en_r123, en_c3r0, en_c3r123;

  assign m_shift = (cs == CS_SHIFT_ALL);
  assign m_rows  = (cs == CS_SHIFT_ROWS);
  assign m_store = (cs == CS_STORE_COL);

  // Group enables (one clock gate each).
  assign en_r0     = m_shift;                      // RS0, RS4, RS8
  assign en_r123   = m_shift | m_rows;             // RS1-3, RS5-7, RS9-11
  assign en_c3r0   = m_shift | m_store;            // RS12
  assign en_c3r123 = m_shift | m_rows | m_store;   // RS13-15

  // Next value of each register in its active mode.
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        int i;
        i = 4 * c + r;
        if (m_rows && r != 0) nxt[i] = rs[4 * ((c + r) % 4) + r];
        else if (i == 15)     nxt[i] = din;
        else                  nxt[i] = rs[i + 1];
      end
    end
  end

  // One clock gate per group: 0 = row 0 of columns 0..2, 1 = rows 1..3 of
  // columns 0..2, 2 = RS12, 3 = RS13..RS15.
  logic [3:0] grp_en, grp_clk;

  assign grp_en = {en_c3r123, en_c3r0, en_r123, en_r0};

  for (genvar gi = 0; gi < 4; gi++) begin : g_gate
    aes_clock_gate u_gate (.clk, .en(grp_en[gi]), .gclk(grp_clk[gi]));
  end

  for (genvar i = 0; i < 16; i++) begin : g_rs
    localparam int GRP = (i == 12) ? 2 : (i > 12) ? 3 : (i % 4 == 0) ? 0 : 1;
    byte_t r;
    always_ff @(posedge grp_clk[GRP] or negedge rst_n)
      if (!rst_n) r <= '0;
      else        r <= nxt[i];
    assign rs[i] = r;
  end

  assign rs0 = rs[0];
  always_comb
    for (int i = 0; i < 16; i++) state[127 - 8 * i -: 8] = rs[i];
endmodule
