// luffa_mixword: MixWord, the linear mixing of a word pair (x_k, x_k+4).
//
// Four XORs and four fixed rotations, in the order of the design's MixWord
// figure:
//   r = x_k+4 ^ x_k;  l = rotl(x_k, 2) ^ r;
//   r = rotl(r, 14) ^ l;  y_k = rotl(l, 10) ^ r;  y_k+4 = rotl(r, 1)
// Combinational.
module luffa_mixword
  import luffa_pkg::*;
(
  input  word_t xk,
  input  word_t xk4,
  output word_t yk,
  output word_t yk4
);
  word_t r1, l1, r2;
  always_comb begin
    r1  = xk4 ^ xk;
    l1  = rotl(xk, 2) ^ r1;
    r2  = rotl(r1, 14) ^ l1;
    yk  = rotl(l1, 10) ^ r2;
    yk4 = rotl(r2, 1);
  end
endmodule
