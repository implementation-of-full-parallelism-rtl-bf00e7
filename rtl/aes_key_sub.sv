// aes_key_sub: the "Key Sub" step of online key expansion, the function g of
// the AES key schedule. The last word of the previous round key is rotated one
// byte to the left (RotWord), each byte goes through an S-box (SubWord), and
// the round constant is XORed into the first byte:
//   g(w) = SubWord(RotWord(w)) ^ {rc, 8'h00, 8'h00, 8'h00}
//
// Interface: w is a key word, byte 0 in bits [31:24]; rc is the round
// constant of this expansion step. Combinational.
//
// RotWord and SubWord follow the description; the round constants and the
// choice of the last word as g's input are taken from the AES standard.
module aes_key_sub
  import aes_pkg::*;
(
  input  word_t w,
  input  byte_t rc,
  output word_t g
);

  word_t rot, sub;

  assign rot = {w[23:0], w[31:24]};

  aes_sub4 #(.INVERSE(1'b0)) u_subword (
    .in  (rot),
    .out (sub)
  );

  assign g = sub ^ {rc, 24'h000000};

endmodule
