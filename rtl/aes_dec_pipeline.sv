// aes_dec_pipeline: AES-128 decryption with all rounds unrolled.
//
// Decryption needs the round keys last-first, but the caller supplies the
// cipher key. The first NR stages therefore run the forward key expansion on
// the fly (one aes_key_sche per stage) while the ciphertext waits beside it;
// the last of them also applies the initial AddRoundKey with round key NR.
// Then NR registered aes_dec_round stages follow (rounds NR-1 down to 0), each
// rebuilding the round key it needs from the one before with a backward
// key-expansion step. No key schedule is stored, and every block carries its
// own key, so the key may change from block to block.
//
// Interface: present ct/key with in_valid high for one clock; 2*NR = 20
// clocks later pt appears with out_valid high. One block can be accepted every
// clock. There is no back-pressure. rst_n is synchronous and active low.
//
// Mirroring the encryption structure with inverse units follows the
// description; the way the reversed round keys are produced on the fly, and
// the resulting latency, are this design's own.
module aes_dec_pipeline
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t ct,
  input  block_t key,
  output logic   out_valid,
  output block_t pt
);


  // ---- key pre-expansion: stage j holds round key j and the ciphertext ----
  logic   kv [NR+1];
  block_t kk [NR+1];
  block_t kc [NR+1];

  assign kv[0] = in_valid;
  assign kk[0] = key;
  assign kc[0] = ct;

  for (genvar j = 1; j <= NR; j++) begin : g_key_stage
    block_t next_key, next_data;
    aes_key_sche #(.INVERSE(1'b0)) u_key (
      .key_in  (kk[j-1]),
      .rc      (rcon(j)),
      .key_out (next_key)
    );
    if (j == NR) begin : g_ark
      // initial AddRoundKey of decryption uses the last round key
      aes_add_round_key u_ark (.state(kc[j-1]), .round_key(next_key), .out(next_data));
    end else begin : g_wait
      assign next_data = kc[j-1];
    end
    always_ff @(posedge clk) begin
      if (!rst_n) kv[j] <= 1'b0;
      else        kv[j] <= kv[j-1];
      if (kv[j-1]) begin
        kk[j] <= next_key;
        kc[j] <= next_data;
      end
    end
  end

  // ---- inverse rounds NR-1 .. 0 ----
  logic   v  [NR+1];
  block_t st [NR+1];
  block_t rk [NR+1];

  assign v[0]  = kv[NR];
  assign st[0] = kc[NR];
  assign rk[0] = kk[NR];

  for (genvar s = 1; s <= NR; s++) begin : g_round
    aes_dec_round #(.ROUND(NR - s)) u_round (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (v[s-1]),
      .in_state  (st[s-1]),
      .in_key    (rk[s-1]),
      .out_valid (v[s]),
      .out_state (st[s]),
      .out_key   (rk[s])
    );
  end

  assign out_valid = v[NR];
  assign pt        = st[NR];

endmodule
