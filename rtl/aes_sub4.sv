// aes_sub4: one "Sub-4" unit of the full-parallelism datapath. It substitutes
// the four bytes of one row of the state through four S-boxes working in
// parallel (INVERSE selects the inverse S-box). Four of these cover the whole
// 16-byte state, so a round substitutes all bytes at once.
//
// Interface: in/out are the four bytes of a row, column 0 in bits [31:24].
// Combinational.
//
// The split of the 16 S-boxes into four units follows the description; giving
// each unit one row follows its remark that rows are substituted
// independently.
module aes_sub4
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  word_t in,
  output word_t out
);

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox #(.INVERSE(INVERSE)) u_sbox (
      .in  (in [31 - 8*i -: 8]),
      .out (out[31 - 8*i -: 8])
    );
  end

endmodule
