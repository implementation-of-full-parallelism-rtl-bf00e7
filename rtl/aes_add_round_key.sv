// aes_add_round_key: AddRoundKey, the bitwise XOR of the 128-bit state with a
// 128-bit round key. It is its own inverse, so the encryption and decryption
// datapaths share it. Combinational.
//
// Follows the description exactly; there is nothing to choose.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state,
  input  block_t round_key,
  output block_t out
);

  assign out = state ^ round_key;

endmodule
