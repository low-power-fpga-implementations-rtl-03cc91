// luffa_tweak: the tweak at the input of permutation Q_J.
//
// Words a4..a7 are rotated left by J bits; a0..a3 pass unchanged. Q_0 has
// no tweak (J = 0 is a plain wire), Q_1 rotates by one bit and Q_2 by two,
// which is a fixed combinational shifter. The rotation amounts are those of
// the Luffa algorithm.
module luffa_tweak
  import luffa_pkg::*;
#(
  parameter int unsigned J = 1
)(
  input  blk_t a,
  output blk_t y
);
  always_comb begin
    for (int k = 0; k < WORDS; k++) begin
      if (k >= 4 && J != 0) y[k] = rotl(a[k], J);
      else                  y[k] = a[k];
    end
  end
endmodule
