// luffa_p: permutation P of Luffa-256, the three permutations Q_0, Q_1 and
// Q_2 applied side by side to the three 256-bit lanes. The lanes do not
// interact inside P. TECH and SBOX_RAM are passed to every Q_j (see
// luffa_q for the registers each technique places); en are the stage
// enables used by LUFFA_GATING.
module luffa_p
  import luffa_pkg::*;
#(
  parameter tech_e TECH     = LUFFA_CONVENTIONAL,
  parameter bit    SBOX_RAM = 1'b0
)(
  input  logic             clk,
  input  logic [STEPS-1:0] en,
  input  state_t           x,
  output state_t           y
);
  for (genvar j = 0; j < LANES; j++) begin : g_q
    luffa_q #(.J(j), .TECH(TECH), .SBOX_RAM(SBOX_RAM)) u_q (
      .clk(clk), .en(en), .a(x[j]), .y(y[j]));
  end
endmodule
