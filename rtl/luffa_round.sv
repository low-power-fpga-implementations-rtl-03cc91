// luffa_round: one Luffa round, message injection MI followed by P.
//
// Takes a message block m and the chaining value h (held by the caller in
// the chaining register) and returns the next chaining value h_out with a
// one-cycle out_valid pulse. Timing depends on TECH:
//   LUFFA_CONVENTIONAL, LUFFA_NEGATIVE: combinational round, out_valid =
//     in_valid, the caller loads h_out on the same rising edge (one round
//     per cycle). In LUFFA_NEGATIVE the falling-edge register inside every
//     Q_j splits the path in two halves without adding latency.
//   LUFFA_POSITIVE, LUFFA_GATING: registers on the M input, after MI, after
//     the tweak and after steps 1..7 give a 10-cycle round: out_valid comes
//     10 cycles after in_valid, and h and the M input must not change
//     meanwhile (h stays in the caller's chaining register; m is captured).
//     A token shift register tracks the round through the stages. In
//     LUFFA_POSITIVE every pipeline register loads on every edge; in
//     LUFFA_GATING each loads only when the token is in the stage feeding
//     it, which is the clock-enable form of clock gating.
// The register placement and the 10-cycle latency follow the design's
// pipeline description; the token and handshake are this design's own.
module luffa_round
  import luffa_pkg::*;
#(
  parameter tech_e TECH     = LUFFA_CONVENTIONAL,
  parameter bit    SBOX_RAM = 1'b0
)(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  blk_t   m,
  input  state_t h,
  output logic   out_valid,
  output state_t h_out
);
  localparam bit PIPE = (TECH == LUFFA_POSITIVE) || (TECH == LUFFA_GATING);

  state_t           x, p_in;
  logic [STEPS-1:0] en;

  if (PIPE) begin : g_pipe
    // vld[0]: M register holds the block; vld[1]: MI register; vld[2]:
    // tweak register; vld[2+i]: register after step i (i = 1..7).
    logic [PIPE_LAT-1:0] vld;
    blk_t                m_q;
    state_t              x_q;

    always_ff @(posedge clk) begin
      if (!rst_n) vld <= '0;
      else        vld <= {vld[PIPE_LAT-2:0], in_valid};
    end

    always_ff @(posedge clk)
      if (TECH == LUFFA_POSITIVE || in_valid) m_q <= m;

    luffa_mi u_mi (.m(m_q), .h(h), .x(x));

    always_ff @(posedge clk)
      if (TECH == LUFFA_POSITIVE || vld[0]) x_q <= x;

    assign p_in      = x_q;
    assign en        = vld[PIPE_LAT-2:1];
    assign out_valid = vld[PIPE_LAT-1];
  end else begin : g_comb
    luffa_mi u_mi (.m(m), .h(h), .x(x));
    assign p_in      = x;
    assign en        = '0;
    assign out_valid = in_valid;
  end

  luffa_p #(.TECH(TECH), .SBOX_RAM(SBOX_RAM)) u_p (
    .clk(clk), .en(en), .x(p_in), .y(h_out));
endmodule
