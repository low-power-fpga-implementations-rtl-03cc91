// luffa_mi: message injection MI for three lanes (Luffa-256).
//
// The three chaining lanes are XORed, the sum is multiplied by 2 and added
// to every lane; the message block is added to lane 0, its double to lane 1
// and its quadruple to lane 2:
//   X_j = H_j ^ 2*(H_0 ^ H_1 ^ H_2) ^ 2^j * M
// This is the structure of the design's MI figure: one 3-input XOR for the
// lane sum, three 3-input XORs for the outputs and three multipliers by 2.
// Combinational.
module luffa_mi
  import luffa_pkg::*;
(
  input  blk_t   m,   // M^i
  input  state_t h,   // H^{i-1}
  output state_t x    // X_0..X_2, to the permutation P
);
  blk_t hsum, hsum2, m2, m4;

  assign hsum = h[0] ^ h[1] ^ h[2];

  luffa_mult2 u_mul_h  (.a(hsum), .y(hsum2));
  luffa_mult2 u_mul_m1 (.a(m),    .y(m2));
  luffa_mult2 u_mul_m2 (.a(m2),   .y(m4));

  assign x[0] = h[0] ^ hsum2 ^ m;
  assign x[1] = h[1] ^ hsum2 ^ m2;
  assign x[2] = h[2] ^ hsum2 ^ m4;
endmodule
