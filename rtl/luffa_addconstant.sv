// luffa_addconstant: AddConstant of step R in permutation Q_J.
//
// XORs the step constant RC0[J][R] into word a0 and RC4[J][R] into word a4;
// the other six words pass through. The constants are the Luffa algorithm's
// (luffa_pkg). Combinational.
module luffa_addconstant
  import luffa_pkg::*;
#(
  parameter int unsigned J = 0,
  parameter int unsigned R = 0
)(
  input  blk_t a,
  output blk_t y
);
  always_comb begin
    y    = a;
    y[0] = a[0] ^ RC0[J][R];
    y[4] = a[4] ^ RC4[J][R];
  end
endmodule
