// aes_sbox: AES S-box (INVERSE = 0) or inverse S-box (INVERSE = 1), computed in
// the composite field GF(((2^2)^2)^2) instead of read from a 256-entry table.
//
// Forward path: the byte is mapped into the composite field (DELTA), split into
// a high nibble ah and a low nibble al, and inverted as
//   d    = LAMBDA*ah^2 ^ (ah ^ al)*al          (square, scale, multiply, XOR)
//   out  = { ah*d^-1 , (ah ^ al)*d^-1 }         (GF(2^4) inverse, two multiplies)
// then mapped back (DELTA_INV) and passed through the affine transform.
// The inverse S-box runs the inverse affine transform first and then the same
// mapping and inversion. The structure of the inversion is the one of the
// multiplicative-inversion datapath described for the design; the field
// polynomials and the basis-change matrices are this design's choice (see
// aes_pkg).
//
// Purely combinational: in[7:0] -> out[7:0].
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t in,
  output byte_t out
);

  byte_t      pre, mapped, inv, post;
  logic [3:0] ah, al, ah_sq, ah_sq_l, sum, sum_al, d, d_inv, out_h, out_l;

  always_comb begin
    pre     = INVERSE ? affine_inv(in) : in;
    mapped  = map_delta(pre);
    ah      = mapped[7:4];
    al      = mapped[3:0];
    sum     = ah ^ al;
    ah_sq   = gf16_sq(ah);
    ah_sq_l = gf16_mul_lambda(ah_sq);
    sum_al   = gf16_mul(sum, al);
    d       = ah_sq_l ^ sum_al;
    d_inv   = gf16_inv(d);
    out_h   = gf16_mul(ah, d_inv);
    out_l   = gf16_mul(sum, d_inv);
    inv     = {out_h, out_l};
    post    = map_delta_inv(inv);
    out     = INVERSE ? post : affine(post);
  end

endmodule
