// aes_gamma: output stage of the composite-field S-box.
//
// gamma merges the inverse isomorphic mapping (composite field back to
// GF(2^8)) with the AES affine transformation and its constant {63}, so the
// S-box needs one 8x8 XOR network here instead of two. Each output bit is a
// fixed XOR (or XNOR, where the constant bit is 1) of input bits:
//   g7 = x7^x3^x2            g3 = x2^x1^x0
//   g6 = ~(x7^x6^x5^x4)      g2 = x6^x5^x4^x3^x2^x0
//   g5 = ~(x7^x2)            g1 = ~(x7^x0)
//   g4 = x7^x4^x1^x0         g0 = ~(x7^x6^x2^x1^x0)
// These equations are the design's (they equal AT x delta^-1 plus {63}).
// The network below shares sub-terms so that it uses exactly 12 two-input
// XOR, 3 XNOR and 1 NOT gate, the gate budget the architecture states; the
// particular sharing is this implementation's. Purely combinational.
//
//   x : byte in the composite-field representation (inverse already taken)
//   g : S-box output byte in the standard AES representation
module aes_gamma (
  input  logic [7:0] x,
  output logic [7:0] g
);
  // Shared XOR terms (7 of the 12 XOR gates).
  logic t72, t10, t65, t654, t74, t32, t7210;

  assign t72   = x[7] ^ x[2];    // XOR 1
  assign t10   = x[1] ^ x[0];    // XOR 2
  assign t65   = x[6] ^ x[5];    // XOR 3
  assign t654  = t65 ^ x[4];     // XOR 4
  assign t74   = x[7] ^ x[4];    // XOR 5
  assign t32   = x[3] ^ x[2];    // XOR 6
  assign t7210 = t72 ^ t10;      // XOR 7

  assign g[7] = t72 ^ x[3];            // XOR 8
  assign g[6] = ~(x[7] ^ t654);        // XNOR 1
  assign g[5] = ~t72;                  // NOT 1
  assign g[4] = t74 ^ t10;             // XOR 9
  assign g[3] = x[2] ^ t10;            // XOR 10
  assign g[2] = (t654 ^ t32) ^ x[0];   // XOR 11, XOR 12
  assign g[1] = ~(x[7] ^ x[0]);        // XNOR 2
  assign g[0] = ~(t7210 ^ x[6]);       // XNOR 3
endmodule
