// aes_ref_pkg: plain behavioural AES-128 used as the reference by the
// testbenches. It works in the polynomial basis of GF(2^8) only: the S-box is
// found by searching for the multiplicative inverse and applying the affine
// transform as rotations, the inverse S-box by searching the S-box, and
// MixColumns by shift-and-add multiplication. None of it shares code with the
// composite-field hardware, so agreement between the two is a real check.
// Byte 0 of a block is bits [127:120], as in the hardware.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] a, int n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] inv = 8'h00;
    for (int c = 1; c < 256; c++) if (gmul(a, 8'(c)) == 8'h01) inv = 8'(c);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] ref_inv_sbox(logic [7:0] b);
    for (int c = 0; c < 256; c++) if (ref_sbox(8'(c)) == b) return 8'(c);
    return 8'h00;
  endfunction

  function automatic logic [7:0] bget(logic [127:0] s, int n);
    return s[127 - 8*n -: 8];
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] s, bit inv);
    logic [127:0] r;
    for (int n = 0; n < 16; n++) r[127 - 8*n -: 8] = inv ? ref_inv_sbox(bget(s, n)) : ref_sbox(bget(s, n));
    return r;
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] s, bit inv);
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        if (!inv) r[127 - 8*(4*c + row) -: 8] = bget(s, 4*((c + row) % 4) + row);
        else      r[127 - 8*(4*((c + row) % 4) + row) -: 8] = bget(s, 4*c + row);
    return r;
  endfunction

  function automatic logic [31:0] ref_mix_col(logic [31:0] w, bit inv);
    logic [7:0] m [4];
    logic [7:0] a [4];
    logic [31:0] r;
    if (!inv) m = '{8'h02, 8'h03, 8'h01, 8'h01};
    else      m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    for (int i = 0; i < 4; i++) a[i] = w[31 - 8*i -: 8];
    for (int i = 0; i < 4; i++) begin
      logic [7:0] acc = 8'h00;
      for (int j = 0; j < 4; j++) acc ^= gmul(m[(j - i + 4) % 4], a[j]);
      r[31 - 8*i -: 8] = acc;
    end
    return r;
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] s, bit inv);
    logic [127:0] r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = ref_mix_col(s[127 - 32*c -: 32], inv);
    return r;
  endfunction

  function automatic logic [31:0] ref_g(logic [31:0] w, logic [7:0] rc);
    logic [31:0] rot = {w[23:0], w[31:24]};
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[31 - 8*i -: 8] = ref_sbox(rot[31 - 8*i -: 8]);
    return r ^ {rc, 24'h0};
  endfunction

  // all eleven round keys from the word recursion W[i] = W[i-1] ^ W[i-4]
  function automatic void ref_expand(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = ref_g(t, rc);
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [7:0] ref_rcon(int r);
    logic [7:0] rc = 8'h01;
    for (int i = 1; i < r; i++) rc = gmul(rc, 8'h02);
    return rc;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    ref_expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (r != 10) s = ref_mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [127:0] ct, logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    ref_expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub_bytes(ref_shift_rows(s, 1), 1) ^ rk[r];
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
