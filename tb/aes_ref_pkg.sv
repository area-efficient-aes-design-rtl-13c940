// aes_ref_pkg: plain reference model of AES-128 encryption for the
// testbenches. It is written straight from the standard's definitions and
// shares nothing with the RTL: the S-box is the multiplicative inverse in
// GF(2^8) (found by search, with shift-and-add multiplication) followed by
// the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 63h.
// Blocks and keys are 128-bit vectors with byte 0 in bits 127:120; state
// byte 4c+r is row r of column c.
package aes_ref_pkg;

  function automatic logic [7:0] ref_gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_rotl(input logic [7:0] x, input int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv = 8'h00;
    for (int b = 1; b < 256; b++)
      if (ref_gmul(x, 8'(b)) == 8'h01) inv = 8'(b);
    return inv ^ ref_rotl(inv, 1) ^ ref_rotl(inv, 2) ^ ref_rotl(inv, 3) ^
           ref_rotl(inv, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] ref_byte(input logic [127:0] v, input int i);
    return v[127 - 8 * i -: 8];
  endfunction

  function automatic logic [127:0] ref_sub_bytes(input logic [127:0] s);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[127 - 8 * i -: 8] = ref_sbox(ref_byte(s, i));
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8 * (4 * c + r) -: 8] = ref_byte(s, 4 * ((c + r) % 4) + r);
    return o;
  endfunction

  function automatic logic [31:0] ref_mix_column(input logic [31:0] col);
    logic [7:0] a [4];
    logic [31:0] o;
    for (int r = 0; r < 4; r++) a[r] = col[31 - 8 * r -: 8];
    for (int r = 0; r < 4; r++)
      o[31 - 8 * r -: 8] = ref_gmul(a[r], 8'h02) ^ ref_gmul(a[(r + 1) % 4], 8'h03) ^
                           a[(r + 2) % 4] ^ a[(r + 3) % 4];
    return o;
  endfunction

  function automatic logic [127:0] ref_mix_columns(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) o[127 - 32 * c -: 32] = ref_mix_column(s[127 - 32 * c -: 32]);
    return o;
  endfunction

  // Round key r+1 from round key r (r counted from 0).
  function automatic logic [127:0] ref_next_key(input logic [127:0] k, input int r);
    logic [7:0]  rc = 8'h01;
    logic [31:0] w [4];
    logic [31:0] t;
    for (int i = 0; i < r; i++) rc = ref_gmul(rc, 8'h02);
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32 * i -: 32];
    t = {w[3][23:0], w[3][31:24]};
    t = {ref_sbox(t[31:24]) ^ rc, ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
    w[0] ^= t;
    w[1] ^= w[0];
    w[2] ^= w[1];
    w[3] ^= w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  // State after `rounds` rounds (0 = after the first Add-Round-Key only).
  function automatic logic [127:0] ref_encrypt_rounds(input logic [127:0] pt,
                                                      input logic [127:0] key,
                                                      input int rounds);
    logic [127:0] s = pt ^ key;
    logic [127:0] k = key;
    for (int r = 1; r <= rounds; r++) begin
      k = ref_next_key(k, r - 1);
      s = ref_shift_rows(ref_sub_bytes(s));
      if (r != 10) s = ref_mix_columns(s);
      s ^= k;
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_encrypt(input logic [127:0] pt, input logic [127:0] key);
    return ref_encrypt_rounds(pt, key, 10);
  endfunction

endpackage
