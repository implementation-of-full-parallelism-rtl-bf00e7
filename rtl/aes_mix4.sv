// aes_mix4: one "Mix-4" unit, MixColumns (INVERSE = 0) or InvMixColumns
// (INVERSE = 1) of a single state column. Four of these run side by side, one
// per column, so the whole state is mixed at once instead of one column after
// another.
//
// The column is multiplied in GF(2^8) by the circulant matrix with first row
// {02,03,01,01} (forward) or {0e,0b,0d,09} (inverse). Products are built from
// repeated xtime, the multiply-by-two of the AES field.
//
// Interface: in/out are one column, row 0 in bits [31:24]. Combinational.
//
// Splitting MixColumns into four per-column units follows the description;
// the matrices are those of the AES standard and the xtime-based multiply is
// this design's choice.
module aes_mix4
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  word_t in,
  output word_t out
);

  byte_t a  [4];
  byte_t x2 [4];
  byte_t x4 [4];
  byte_t x8 [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a[i]  = in[31 - 8*i -: 8];
      x2[i] = xtime(a[i]);
      x4[i] = xtime(x2[i]);
      x8[i] = xtime(x4[i]);
    end
    for (int i = 0; i < 4; i++) begin
      if (!INVERSE) begin
        // 02*a0 ^ 03*a1 ^ a2 ^ a3 (indices rotated by row)
        out[31 - 8*i -: 8] = x2[i] ^ (x2[(i+1)%4] ^ a[(i+1)%4]) ^ a[(i+2)%4] ^ a[(i+3)%4];
      end else begin
        // 0e*a0 ^ 0b*a1 ^ 0d*a2 ^ 09*a3
        out[31 - 8*i -: 8] = (x8[i] ^ x4[i] ^ x2[i])
                           ^ (x8[(i+1)%4] ^ x2[(i+1)%4] ^ a[(i+1)%4])
                           ^ (x8[(i+2)%4] ^ x4[(i+2)%4] ^ a[(i+2)%4])
                           ^ (x8[(i+3)%4] ^ a[(i+3)%4]);
      end
    end
  end

endmodule
