// aes_pkg: types, constants and Galois-field helpers shared by the AES-128
// datapath.
//
// State layout: a 128-bit block is held as logic [127:0] in the byte order of
// the AES standard, byte 0 in bits [127:120]. Byte n sits in row n%4 and
// column n/4 of the 4x4 state array, so column c is the 32-bit word
// [127-32c -: 32].
//
// The S-box is computed, not looked up: a byte is mapped into the composite
// field GF(((2^2)^2)^2), inverted there and mapped back. The towers used are
//   GF(2^2)  = GF(2)[x]    / (x^2 + x + 1)
//   GF(2^4)  = GF(2^2)[y]  / (y^2 + y + PHI),     PHI    = 2'b10
//   GF(2^8)  = GF(2^4)[z]  / (z^2 + z + LAMBDA),  LAMBDA = 4'b1100
// DELTA holds the columns of the isomorphism from the AES polynomial basis
// (x^8+x^4+x^3+x+1) into this tower: column i is the image of 2^i, i.e. the
// i-th power of a root (8'h42) of the AES polynomial in the tower.
// DELTA_INV holds the columns of the inverse map. The tower, PHI, LAMBDA and
// the root are this design's choices; the structure of the inversion follows
// the usual composite-field S-box.
package aes_pkg;

  localparam int unsigned NR = 10;   // rounds of AES-128

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  localparam logic [1:0] PHI    = 2'b10;
  localparam logic [3:0] LAMBDA = 4'b1100;

  localparam byte_t DELTA     [8] = '{8'h01, 8'h42, 8'h6a, 8'h60, 8'h5f, 8'h91, 8'h51, 8'hc6};
  localparam byte_t DELTA_INV [8] = '{8'h01, 8'hbc, 8'h5c, 8'hb0, 8'hff, 8'hb6, 8'hbe, 8'hde};

  // ---------------- byte and word access ----------------
  function automatic byte_t get_byte(block_t s, int unsigned n);
    return s[127 - 8*n -: 8];
  endfunction

  function automatic word_t get_col(block_t s, int unsigned c);
    return s[127 - 32*c -: 32];
  endfunction

  // ---------------- AES polynomial basis ----------------
  // multiply by x modulo x^8+x^4+x^3+x+1
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // round constant of key-expansion step r (1..10): x^(r-1)
  function automatic byte_t rcon(int unsigned r);
    byte_t v = 8'h01;
    for (int unsigned i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

  // ---------------- GF(2^2) ----------------
  function automatic logic [1:0] gf4_mul(logic [1:0] a, logic [1:0] b);
    logic hh;
    hh = a[1] & b[1];
    return {(a[1] & b[0]) ^ (a[0] & b[1]) ^ hh, (a[0] & b[0]) ^ hh};
  endfunction

  // ---------------- GF((2^2)^2) ----------------
  function automatic logic [3:0] gf16_mul(logic [3:0] a, logic [3:0] b);
    logic [1:0] hh, rh, rl;
    hh = gf4_mul(a[3:2], b[3:2]);
    rh = gf4_mul(a[3:2], b[1:0]) ^ gf4_mul(a[1:0], b[3:2]) ^ hh;
    rl = gf4_mul(a[1:0], b[1:0]) ^ gf4_mul(hh, PHI);
    return {rh, rl};
  endfunction

  function automatic logic [3:0] gf16_sq(logic [3:0] a);
    return gf16_mul(a, a);
  endfunction

  function automatic logic [3:0] gf16_mul_lambda(logic [3:0] a);
    return gf16_mul(a, LAMBDA);
  endfunction

  // inverse in GF((2^2)^2): for a = ah*y + al,
  // d = PHI*ah^2 + ah*al + al^2, a^-1 = ah*d^-1 * y + (ah+al)*d^-1,
  // and in GF(2^2) the inverse is the square.
  function automatic logic [3:0] gf16_inv(logic [3:0] a);
    logic [1:0] ah, al, d, di;
    ah = a[3:2];
    al = a[1:0];
    d  = gf4_mul(gf4_mul(ah, ah), PHI) ^ gf4_mul(ah, al) ^ gf4_mul(al, al);
    di = gf4_mul(d, d);
    return {gf4_mul(ah, di), gf4_mul(ah ^ al, di)};
  endfunction

  // ---------------- basis change and affine maps ----------------
  function automatic byte_t map_delta(byte_t a);
    byte_t r = '0;
    for (int i = 0; i < 8; i++) if (a[i]) r ^= DELTA[i];
    return r;
  endfunction

  function automatic byte_t map_delta_inv(byte_t a);
    byte_t r = '0;
    for (int i = 0; i < 8; i++) if (a[i]) r ^= DELTA_INV[i];
    return r;
  endfunction

  // forward affine transform: b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7) ^ c_i, c = 63h
  function automatic byte_t affine(byte_t a);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = a[i] ^ a[(i+4)%8] ^ a[(i+5)%8] ^ a[(i+6)%8] ^ a[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // inverse affine transform: a_i = b_(i+2) ^ b_(i+5) ^ b_(i+7) ^ d_i, d = 05h
  function automatic byte_t affine_inv(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

endpackage
