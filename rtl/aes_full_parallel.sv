// aes_full_parallel: full-parallelism AES-128 engine with an encryption and a
// decryption datapath side by side.
//
// Both datapaths are loop-unrolled: every round has its own hardware and its
// own pipeline register, and within a round the 16 S-boxes (four Sub-4 units)
// and the four column mixers (four Mix-4 units) work in parallel. Round keys
// are expanded online next to the data, so neither side stores a key
// schedule and every block may use a different key.
//
// Interface: two independent streaming channels, usable in the same clock.
//   encryption: enc_in_valid, enc_pt, enc_key -> enc_out_valid, enc_ct
//               latency ENC_LATENCY = NR+1 clocks
//   decryption: dec_in_valid, dec_ct, dec_key -> dec_out_valid, dec_pt
//               latency DEC_LATENCY = 2*NR clocks (NR of them expand the key)
// Each channel takes one 128-bit block per clock and has no back-pressure.
// Keys are the 128-bit cipher key on both channels. rst_n is synchronous,
// active low, and clears the valid bits only.
//
// Having both datapaths in one engine follows the description; running them
// as two independent channels is this design's choice.
module aes_full_parallel
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // encryption channel
  input  logic   enc_in_valid,
  input  block_t enc_pt,
  input  block_t enc_key,
  output logic   enc_out_valid,
  output block_t enc_ct,
  // decryption channel
  input  logic   dec_in_valid,
  input  block_t dec_ct,
  input  block_t dec_key,
  output logic   dec_out_valid,
  output block_t dec_pt
);

  localparam int unsigned ENC_LATENCY = NR + 1;
  localparam int unsigned DEC_LATENCY = 2 * NR;

  aes_enc_pipeline u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_in_valid),
    .pt        (enc_pt),
    .key       (enc_key),
    .out_valid (enc_out_valid),
    .ct        (enc_ct)
  );

  aes_dec_pipeline u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dec_in_valid),
    .ct        (dec_ct),
    .key       (dec_key),
    .out_valid (dec_out_valid),
    .pt        (dec_pt)
  );

  // every accepted block leaves its datapath after the fixed latency
  a_enc_latency: assert property (@(posedge clk) disable iff (!rst_n)
    enc_in_valid |-> ##ENC_LATENCY enc_out_valid);
  a_dec_latency: assert property (@(posedge clk) disable iff (!rst_n)
    dec_in_valid |-> ##DEC_LATENCY dec_out_valid);

endmodule
