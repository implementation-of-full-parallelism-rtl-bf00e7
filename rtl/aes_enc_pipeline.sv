// aes_enc_pipeline: AES-128 encryption with all rounds unrolled. The initial
// AddRoundKey stage is followed by NR-1 full rounds and one last round without
// MixColumns, each a registered aes_enc_round with its own four Sub-4 and four
// Mix-4 units. Every round stage also carries the round key it used and
// derives the next one, so each block travels with its own key and the key
// may change from one block to the next.
//
// Interface: present pt/key with in_valid high for one clock; NR+1 = 11
// clocks later ct appears with out_valid high. One block can be accepted every
// clock. There is no back-pressure. rst_n is synchronous and active low.
//
// The unrolled arrangement and online key expansion follow the described
// full-parallelism data flow; the register after every round, the valid bit
// and the absence of back-pressure are this design's own choices.
module aes_enc_pipeline
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t pt,
  input  block_t key,
  output logic   out_valid,
  output block_t ct
);


  logic   v   [NR+1];
  block_t st  [NR+1];
  block_t rk  [NR+1];
  block_t ark0;

  // ---- stage 0: initial AddRoundKey with the cipher key (round key 0) ----
  aes_add_round_key u_ark0 (.state(pt), .round_key(key), .out(ark0));

  always_ff @(posedge clk) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
    if (in_valid) begin
      st[0] <= ark0;
      rk[0] <= key;
    end
  end

  // ---- rounds 1..NR, unrolled ----
  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_enc_round #(.ROUND(r)) u_round (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (v[r-1]),
      .in_state  (st[r-1]),
      .in_key    (rk[r-1]),
      .out_valid (v[r]),
      .out_state (st[r]),
      .out_key   (rk[r])
    );
  end

  assign out_valid = v[NR];
  assign ct        = st[NR];

endmodule
