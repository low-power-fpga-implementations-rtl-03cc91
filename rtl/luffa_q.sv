// luffa_q: permutation Q_J, the tweak followed by eight steps.
//
// The registers inside Q_J depend on the round technique TECH:
//   LUFFA_CONVENTIONAL  tweak and all eight steps are one combinational path.
//   LUFFA_POSITIVE      a rising-edge register after the tweak and after each
//                       of steps 1..7 (eight registers, loaded every cycle).
//   LUFFA_GATING        the same registers, each loaded only when its enable
//                       en[i] is high (clock enable instead of a free clock).
//   LUFFA_NEGATIVE      one falling-edge register between steps 3 and 4, so
//                       the tweak and steps 1-3 settle in the first half of
//                       the clock period and steps 4-8 in the second.
// en[0] loads the tweak register, en[i] (i = 1..7) the register after step
// i; en is ignored except in LUFFA_GATING. The output y is combinational
// from the last register (or from a in LUFFA_CONVENTIONAL). Register
// placement follows the design's pipeline figures; the enables come from
// luffa_round.
module luffa_q
  import luffa_pkg::*;
#(
  parameter int unsigned J        = 0,
  parameter tech_e       TECH     = LUFFA_CONVENTIONAL,
  parameter bit          SBOX_RAM = 1'b0
)(
  input  logic             clk,
  input  logic [STEPS-1:0] en,
  input  blk_t             a,
  output blk_t             y
);
  localparam bit PIPE = (TECH == LUFFA_POSITIVE) || (TECH == LUFFA_GATING);
  localparam int unsigned NEG_AFTER = 3;  // falling-edge register after step 3

  blk_t tw;
  blk_t d [STEPS+1];  // d[0]: step-1 input, d[r]: input of step r+1
  blk_t s [STEPS];    // s[r]: output of step r+1

  luffa_tweak #(.J(J)) u_tweak (.a(a), .y(tw));

  // Register (or wire) between the tweak and step 1.
  if (PIPE) begin : g_treg
    blk_t q;
    always_ff @(posedge clk)
      if (TECH == LUFFA_POSITIVE || en[0]) q <= tw;
    assign d[0] = q;
  end else begin : g_twire
    assign d[0] = tw;
  end

  for (genvar r = 0; r < STEPS; r++) begin : g_step
    luffa_step #(.J(J), .R(r), .SBOX_RAM(SBOX_RAM)) u_step (.a(d[r]), .y(s[r]));

    if (PIPE && r < STEPS - 1) begin : g_preg
      blk_t q;
      always_ff @(posedge clk)
        if (TECH == LUFFA_POSITIVE || en[r+1]) q <= s[r];
      assign d[r+1] = q;
    end else if (TECH == LUFFA_NEGATIVE && r == NEG_AFTER - 1) begin : g_nreg
      blk_t q;
      always_ff @(negedge clk) q <= s[r];
      assign d[r+1] = q;
    end else begin : g_wire
      assign d[r+1] = s[r];
    end
  end

  assign y = d[STEPS];
endmodule
