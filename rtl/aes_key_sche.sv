// aes_key_sche: one step of online key expansion for AES-128 ("Key Sub" plus
// "Key Sche").
//
// Forward (INVERSE = 0): from round key r-1, words w0..w3, build round key r:
//   n0 = w0 ^ g(w3),  n1 = w1 ^ n0,  n2 = w2 ^ n1,  n3 = w3 ^ n2
// i.e. W[i] = W[i-1] ^ W[i-4], with g applied every fourth word.
// Backward (INVERSE = 1): from round key r, words n0..n3, rebuild round
// key r-1 with the same XORs read the other way:
//   w3 = n3 ^ n2,  w2 = n2 ^ n1,  w1 = n1 ^ n0,  w0 = n0 ^ g(w3)
// The backward step lets the decryption datapath generate its keys on the
// fly in the reverse order (key 10 first, key 0 last); it is this design's
// own way of running key expansion online for decryption.
//
// Interface: key_in/key_out are 128-bit round keys, word 0 in [127:96];
// rc is the round constant of step r (1..10). Combinational.
module aes_key_sche
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t key_in,
  input  byte_t  rc,
  output block_t key_out
);

  word_t w0, w1, w2, w3;     // words of round key r-1
  word_t n0, n1, n2, n3;     // words of round key r
  word_t g_in, g_out;

  aes_key_sub u_key_sub (
    .w  (g_in),
    .rc (rc),
    .g  (g_out)
  );

  always_comb begin
    if (!INVERSE) begin
      {w0, w1, w2, w3} = key_in;
      g_in = w3;
      n0 = w0 ^ g_out;
      n1 = w1 ^ n0;
      n2 = w2 ^ n1;
      n3 = w3 ^ n2;
      key_out = {n0, n1, n2, n3};
    end else begin
      {n0, n1, n2, n3} = key_in;
      w3 = n3 ^ n2;
      w2 = n2 ^ n1;
      w1 = n1 ^ n0;
      g_in = w3;
      w0 = n0 ^ g_out;
      key_out = {w0, w1, w2, w3};
    end
  end

endmodule
