// aes_sbox: AES Sub-Bytes for one byte, built on composite-field arithmetic.
//
// The byte is mapped by the isomorphic function delta from GF(2^8) into
// GF(((2^2)^2)^2), inverted there, and then passed through gamma
// (aes_gamma), which combines the inverse mapping with the affine
// transformation. The delta matrix is the design's. The inversion follows the
// usual tower formula: for q = qH*y + qL,
//   d      = lambda*qH^2 + qH*qL + qL^2
//   q^-1   = (qH*d^-1)*y + (qH + qL)*d^-1
// with the GF(2^4) arithmetic of aes_pkg (the choice of lambda = {1100},
// phi = {10} is implied by delta; the 4-bit inverse is written as a^14).
// Purely combinational: one instance is shared by the state and key paths.
//
//   a : input byte
//   s : SubBytes(a)
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t s
);
  byte_t      q;       // delta(a)
  logic [3:0] qh, ql, d, dinv;
  byte_t      qinv;

  // delta: rows give output bits 7..0 of q.
  assign q[7] = a[7] ^ a[5];
  assign q[6] = a[7] ^ a[6] ^ a[4] ^ a[3] ^ a[2] ^ a[1];
  assign q[5] = a[7] ^ a[5] ^ a[3] ^ a[2];
  assign q[4] = a[7] ^ a[5] ^ a[3] ^ a[2] ^ a[1];
  assign q[3] = a[7] ^ a[6] ^ a[2] ^ a[1];
  assign q[2] = a[7] ^ a[4] ^ a[3] ^ a[2] ^ a[1];
  assign q[1] = a[6] ^ a[4] ^ a[1];
  assign q[0] = a[6] ^ a[1] ^ a[0];

  assign qh   = q[7:4];
  assign ql   = q[3:0];
  assign d    = gf4_mul_lambda(gf4_sq(qh)) ^ gf4_mul(qh, ql) ^ gf4_sq(ql);
  assign dinv = gf4_inv(d);
  assign qinv = {gf4_mul(qh, dinv), gf4_mul(qh ^ ql, dinv)};

  aes_gamma u_gamma (.x(qinv), .g(s));
endmodule
