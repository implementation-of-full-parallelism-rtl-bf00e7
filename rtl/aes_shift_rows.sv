// aes_shift_rows: ShiftRows (INVERSE = 0) or InvShiftRows (INVERSE = 1).
// Row r of the state is rotated left (forward) or right (inverse) by r byte
// positions; row 0 stays where it is. Pure wiring, combinational.
//
// Byte n of the state (row n%4, column n/4) is bits [127-8n -: 8].
//
// The rotation amounts follow the description; the byte numbering is the
// FIPS-197 one.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t in,
  output block_t out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        // forward: out[r][c] = in[r][(c + r) % 4]; inverse: in[r][(c - r) % 4]
        out[127 - 8*(4*c + r) -: 8] =
          in[127 - 8*(4*(INVERSE ? (c + 4 - r) % 4 : (c + r) % 4) + r) -: 8];
      end
    end
  end

endmodule
