// aes_dec_round: one unrolled decryption round, registered at its output.
//
// The round applies InvShiftRows, four inverse Sub-4 units (one per row),
// AddRoundKey and four inverse Mix-4 units (one per column), in that order.
// The last round (ROUND = 0) leaves out InvMixColumns. Round keys are used in
// reverse: the stage receives round key ROUND+1 and rebuilds round key ROUND
// from it with a backward key-expansion step, so the decryption side also
// expands its keys online.
//
// Interface: in_state/in_key/in_valid carry the state before this round and
// round key ROUND+1; one clock later out_state/out_key/out_valid carry the
// state after it and round key ROUND. A new block may enter every clock.
// Reset (rst_n low, synchronous) clears only out_valid.
//
// The order of the inverse steps follows the description; building the round
// with four inverse Sub-4 and four inverse Mix-4 units like the encryption
// round, and the backward key step, are this design's own.
module aes_dec_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 9
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t in_state,
  input  block_t in_key,
  output logic   out_valid,
  output block_t out_state,
  output block_t out_key
);

  localparam bit LAST = (ROUND == 0);

  block_t shifted, sub_state, keyed, round_key, next_state;

  aes_shift_rows #(.INVERSE(1'b1)) u_shift (.in(in_state), .out(shifted));

  // ---- inverse Sub-4 x 4: row r holds bytes r, r+4, r+8, r+12 ----
  for (genvar r = 0; r < 4; r++) begin : g_sub_row
    word_t row_in, row_out;
    assign row_in = {shifted[127 - 8*r -: 8], shifted[127 - 8*(r+4) -: 8],
                     shifted[127 - 8*(r+8) -: 8], shifted[127 - 8*(r+12) -: 8]};
    aes_sub4 #(.INVERSE(1'b1)) u_sub4 (.in(row_in), .out(row_out));
    assign sub_state[127 - 8*r      -: 8] = row_out[31:24];
    assign sub_state[127 - 8*(r+4)  -: 8] = row_out[23:16];
    assign sub_state[127 - 8*(r+8)  -: 8] = row_out[15:8];
    assign sub_state[127 - 8*(r+12) -: 8] = row_out[7:0];
  end

  // ---- backward key expansion: round key ROUND from round key ROUND+1 ----
  aes_key_sche #(.INVERSE(1'b1)) u_key (
    .key_in  (in_key),
    .rc      (rcon(ROUND + 1)),
    .key_out (round_key)
  );

  aes_add_round_key u_ark (.state(sub_state), .round_key(round_key), .out(keyed));

  if (LAST) begin : g_no_mix
    assign next_state = keyed;
  end else begin : g_mix
    for (genvar c = 0; c < 4; c++) begin : g_mix_col
      aes_mix4 #(.INVERSE(1'b1)) u_mix4 (
        .in  (keyed     [127 - 32*c -: 32]),
        .out (next_state[127 - 32*c -: 32])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    if (in_valid) begin
      out_state <= next_state;
      out_key   <= round_key;
    end
  end

endmodule
