// luffa_step: one step of permutation Q_J (step number R, 0-based).
//
// SubCrumb on the words (a0,a1,a2,a3) and on (a5,a6,a7,a4), then MixWord on
// the four pairs (a_k, a_k+4), then AddConstant on a0 and a4, as drawn in
// the design's step figure. The word order of the second SubCrumb follows
// the Luffa algorithm. Combinational.
module luffa_step
  import luffa_pkg::*;
#(
  parameter int unsigned J        = 0,
  parameter int unsigned R        = 0,
  parameter bit          SBOX_RAM = 1'b0
)(
  input  blk_t a,
  output blk_t y
);
  blk_t s, mw;

  luffa_subcrumb #(.SBOX_RAM(SBOX_RAM)) u_sc0 (
    .w0(a[0]), .w1(a[1]), .w2(a[2]), .w3(a[3]),
    .y0(s[0]), .y1(s[1]), .y2(s[2]), .y3(s[3]));
  luffa_subcrumb #(.SBOX_RAM(SBOX_RAM)) u_sc1 (
    .w0(a[5]), .w1(a[6]), .w2(a[7]), .w3(a[4]),
    .y0(s[5]), .y1(s[6]), .y2(s[7]), .y3(s[4]));

  for (genvar k = 0; k < 4; k++) begin : g_mix
    luffa_mixword u_mw (.xk(s[k]), .xk4(s[k+4]), .yk(mw[k]), .yk4(mw[k+4]));
  end

  luffa_addconstant #(.J(J), .R(R)) u_ac (.a(mw), .y(y));
endmodule
