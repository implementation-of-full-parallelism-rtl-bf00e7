// aes_enc_round: one unrolled encryption round ("one loop") of the
// full-parallelism datapath, registered at its output.
//
// The state goes through four Sub-4 units (one per state row, all 16 bytes at
// once), ShiftRows, four Mix-4 units (one per column, all four columns at
// once) and AddRoundKey. Alongside it, Key Sub / Key Sche derive this round's
// key from the previous round key, so keys are expanded online, block by
// block, with no stored key schedule. The last round (ROUND = NR) leaves out
// MixColumns, as AES requires.
//
// Interface: in_state/in_key/in_valid carry the state after round ROUND-1 and
// round key ROUND-1. One clock later out_state/out_key/out_valid carry the
// state after round ROUND and round key ROUND. A new block may enter every
// clock. Reset (rst_n low, synchronous) clears only out_valid.
//
// The units and their order follow the described loop; the output register
// and the valid bit are this design's own.
module aes_enc_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1
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

  localparam bit LAST = (ROUND == NR);

  block_t sub_state, shifted, mixed, round_key, next_state;

  // ---- Sub-4 x 4: row r holds bytes r, r+4, r+8, r+12 ----
  for (genvar r = 0; r < 4; r++) begin : g_sub_row
    word_t row_in, row_out;
    assign row_in = {in_state[127 - 8*r -: 8], in_state[127 - 8*(r+4) -: 8],
                     in_state[127 - 8*(r+8) -: 8], in_state[127 - 8*(r+12) -: 8]};
    aes_sub4 #(.INVERSE(1'b0)) u_sub4 (.in(row_in), .out(row_out));
    assign sub_state[127 - 8*r      -: 8] = row_out[31:24];
    assign sub_state[127 - 8*(r+4)  -: 8] = row_out[23:16];
    assign sub_state[127 - 8*(r+8)  -: 8] = row_out[15:8];
    assign sub_state[127 - 8*(r+12) -: 8] = row_out[7:0];
  end

  aes_shift_rows #(.INVERSE(1'b0)) u_shift (.in(sub_state), .out(shifted));

  // ---- Mix-4 x 4, one per column; bypassed in the last round ----
  if (LAST) begin : g_no_mix
    assign mixed = shifted;
  end else begin : g_mix
    for (genvar c = 0; c < 4; c++) begin : g_mix_col
      aes_mix4 #(.INVERSE(1'b0)) u_mix4 (
        .in  (shifted[127 - 32*c -: 32]),
        .out (mixed  [127 - 32*c -: 32])
      );
    end
  end

  // ---- online key expansion: round key ROUND from round key ROUND-1 ----
  aes_key_sche #(.INVERSE(1'b0)) u_key (
    .key_in  (in_key),
    .rc      (rcon(ROUND)),
    .key_out (round_key)
  );

  aes_add_round_key u_ark (.state(mixed), .round_key(round_key), .out(next_state));

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    if (in_valid) begin
      out_state <= next_state;
      out_key   <= round_key;
    end
  end

endmodule
