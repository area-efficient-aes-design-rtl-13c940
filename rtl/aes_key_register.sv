// aes_key_register: 16-byte rotating key register for byte-serial,
// on-the-fly AES-128 key expansion.
//
// Byte K(4c+r) holds row r of word c of the current round key. When `shift`
// is high all bytes move down by one (K(i) <- K(i+1)) and `din` enters at
// K15; the byte leaving K0 is the round-key byte in use (out1). Sixteen
// shifts process one whole round key, byte 0 first. Because the new byte i
// enters at K15 while the old bytes move down, after four shifts the new
// byte i-4 sits in K12, which is exactly the term the expansion
// w'(j) = w(j) ^ w'(j-1) needs; k12 exposes it. `out2` is the byte routed to
// the shared S-box for SubWord(RotWord(w3)), picked by `tap` (K13 while the
// register is mid-update, K9 for the fourth byte; K12..K15 when the word is
// read in place). The XOR that forms the new byte, and the choice between a
// fresh key byte and the expanded one, sit outside in the core. The
// architecture gives this register's role and its two outputs (one to the
// key XOR, one to the S-box); the byte order and the taps are this
// implementation's.
// Single clock, asynchronous active-low reset to zero.
module aes_key_register
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     shift,
  input  byte_t    din,
  input  key_tap_e tap,
  output byte_t    out1,
  output byte_t    k12,
  output byte_t    out2
);
  byte_t k [16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) k[i] <= '0;
    end else if (shift) begin
      for (int i = 0; i < 15; i++) k[i] <= k[i + 1];
      k[15] <= din;
    end
  end

  assign out1 = k[0];
  assign k12  = k[12];

  always_comb begin
    unique case (tap)
      KTAP_K9:  out2 = k[9];
      KTAP_K12: out2 = k[12];
      KTAP_K13: out2 = k[13];
      KTAP_K14: out2 = k[14];
      KTAP_K15: out2 = k[15];
      default:  out2 = k[13];
    endcase
  end
endmodule
