// aes_pkg: types, constants and GF helper functions shared by the 8-bit
// AES-128 encryption core.
//
// The state register is steered by four control signals CS3..CS0. Three of
// their combinations are the ones the design is built around (shift every
// register, rotate rows 1-3 for Shift-Rows, shift only the last column);
// every other combination holds the register. The composite-field helpers
// implement GF(2^2) with x^2+x+1, GF((2^2)^2) with y^2+y+phi, phi={10}, and
// the lambda={1100} constant of the GF(((2^2)^2)^2) inversion; this tower is
// the one that matches the isomorphic mapping used by the S-box.
package aes_pkg;

  typedef logic [7:0] byte_t;

  // State-register control word, bit order {CS3, CS2, CS1, CS0}.
  typedef logic [3:0] cs_t;
  localparam cs_t CS_SHIFT_ALL  = 4'b1111; // load, first/last ARK, Mix-Columns feed
  localparam cs_t CS_SHIFT_ROWS = 4'b1100; // CS0 = CS1 = 0, CS2 = CS3 = 1
  localparam cs_t CS_STORE_COL  = 4'b1110; // CS0 = 0: only the last column shifts
  localparam cs_t CS_HOLD       = 4'b0000;

  // Source of the byte written into RS15.
  typedef enum logic [1:0] {
    DSEL_LOAD = 2'd0,  // plaintext byte XOR key byte (first Add-Round-Key)
    DSEL_MIX  = 2'd1,  // Mix-Columns byte XOR round-key byte
    DSEL_SBOX = 2'd2   // S-box byte XOR round-key byte (last round)
  } din_sel_e;

  // Key-register byte routed to the shared S-box.
  typedef enum logic [2:0] {
    KTAP_K9  = 3'd0,
    KTAP_K12 = 3'd1,
    KTAP_K13 = 3'd2,
    KTAP_K14 = 3'd3,
    KTAP_K15 = 3'd4
  } key_tap_e;

  // Control-unit phases.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_LOAD  = 3'd1,  // 16 cycles: load plaintext with the first Add-Round-Key
    PH_SROWS = 3'd2,  // 1 cycle: Shift-Rows
    PH_FEED  = 3'd3,  // 4 cycles: one column through the S-box into Mix-Columns
    PH_STORE = 3'd4,  // 4 cycles: Mix-Columns result XOR round key into column 3
    PH_KPRE  = 3'd5,  // 4 cycles: last round, S-box on the key word (state holds)
    PH_LAST  = 3'd6   // 16 cycles: last round, S-box XOR round key, no Mix-Columns
  } phase_e;

  localparam int unsigned NUM_ROUNDS = 10;
  // Clock edges from the edge that takes Drdy to the edge that raises Dvld:
  // 16 (load) + 9 rounds * (1 + 4 * (4 + 4)) + last round (1 + 4 + 16).
  localparam int unsigned ROUND_CYCLES = 33;
  localparam int unsigned ENC_CYCLES   = 16 + 9 * ROUND_CYCLES + 21;

  // Multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // GF(2^2), polynomial x^2+x+1.
  function automatic logic [1:0] gf2_mul(input logic [1:0] a, input logic [1:0] b);
    logic hh;
    hh = a[1] & b[1];
    return {hh ^ (a[1] & b[0]) ^ (a[0] & b[1]), hh ^ (a[0] & b[0])};
  endfunction

  // Multiply by phi = {10} in GF(2^2).
  function automatic logic [1:0] gf2_mul_phi(input logic [1:0] a);
    return {a[1] ^ a[0], a[1]};
  endfunction

  // GF((2^2)^2), polynomial y^2+y+phi.
  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] hh, hl, lh, ll;
    hh = gf2_mul(a[3:2], b[3:2]);
    hl = gf2_mul(a[3:2], b[1:0]);
    lh = gf2_mul(a[1:0], b[3:2]);
    ll = gf2_mul(a[1:0], b[1:0]);
    return {hh ^ hl ^ lh, gf2_mul_phi(hh) ^ ll};
  endfunction

  function automatic logic [3:0] gf4_sq(input logic [3:0] a);
    return gf4_mul(a, a);
  endfunction

  // Multiply by lambda = {1100} in GF((2^2)^2).
  function automatic logic [3:0] gf4_mul_lambda(input logic [3:0] a);
    return gf4_mul(a, 4'b1100);
  endfunction

  // Multiplicative inverse in GF((2^2)^2) by Fermat: a^-1 = a^14 (0 -> 0).
  function automatic logic [3:0] gf4_inv(input logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = gf4_sq(a);
    a4 = gf4_sq(a2);
    a8 = gf4_sq(a4);
    return gf4_mul(gf4_mul(a2, a4), a8);
  endfunction

endpackage
