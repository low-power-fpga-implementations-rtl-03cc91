// luffa_top: Luffa-256 hash core.
//
// A message of n bits arrives as 256-bit blocks. The padder pads it and
// cuts it into blocks m^1..m^t; each block goes through the message
// multiplexer into one Luffa round (message injection MI, then the
// permutation P made of Q_0, Q_1, Q_2), whose output is written back into
// the 768-bit chaining register H. After the last block a blank round with
// the all-zero message runs, and the XOR of its three 256-bit output lanes
// is stored in the Z register: the 256-bit hash.
//
// Interface: pulse start while busy is low, with the length n (bits). The
// core takes ceil(n/256) blocks on msg_valid/msg_ready (first message bit in
// msg_data[255]). z_valid pulses for one cycle when z holds the hash; z
// keeps it until the next hash ends.
//
// Timing: the default TECH = LUFFA_GATING (the clock-enable pipeline, the
// lowest-power form) and LUFFA_POSITIVE take 10 cycles per round; the next
// block is taken on the edge where the previous round ends, so a t-block
// padded message spends 10*(t+1) cycles in rounds; z_valid rises one cycle
// after the blank round ends. With LUFFA_CONVENTIONAL or LUFFA_NEGATIVE a round
// takes one cycle and the same message takes t+1 cycles. SBOX_RAM = 1
// builds every S-box as a 16x4 memory.
//
// The structure (padder, MUX, round, chaining feedback, XOR and Z register)
// follows the design's top-level figure; the control FSM, the handshakes
// and the reset (synchronous, active low) are this design's own.
module luffa_top
  import luffa_pkg::*;
#(
  parameter tech_e       TECH     = LUFFA_GATING,
  parameter bit          SBOX_RAM = 1'b0,
  parameter int unsigned N_W      = 64
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] n,
  input  logic           msg_valid,
  output logic           msg_ready,
  input  blk_t           msg_data,
  output logic           busy,
  output logic           z_valid,
  output blk_t           z
);
  localparam bit PIPE = (TECH == LUFFA_POSITIVE) || (TECH == LUFFA_GATING);

  typedef enum logic [1:0] {S_IDLE, S_MSG, S_BLANK, S_FIN} state_e;

  state_e state;
  state_t h_q, h_next;
  blk_t   pad_data, m_sel;
  logic   pad_valid, pad_ready, pad_last;
  logic   free, issue, blank_sel, rnd_valid, done_blank;
  logic   inflight, rnd_blank;

  luffa_padder #(.N_W(N_W)) u_padder (
    .clk(clk), .rst_n(rst_n),
    .start(start && state == S_IDLE), .n(n),
    .msg_valid(msg_valid), .msg_ready(msg_ready), .msg_data(msg_data),
    .out_valid(pad_valid), .out_ready(pad_ready), .out_data(pad_data),
    .out_last(pad_last), .busy());

  assign blank_sel = (state == S_BLANK);
  assign free      = !inflight || rnd_valid;  // a finishing round frees the pipe
  assign pad_ready = (state == S_MSG) && free;
  assign issue     = free && ((state == S_MSG && pad_valid) || state == S_BLANK);

  luffa_msg_mux u_mux (.blank(blank_sel), .m(pad_data), .m_out(m_sel));

  luffa_round #(.TECH(TECH), .SBOX_RAM(SBOX_RAM)) u_round (
    .clk(clk), .rst_n(rst_n), .in_valid(issue), .m(m_sel), .h(h_q),
    .out_valid(rnd_valid), .h_out(h_next));

  // A pipelined round is in flight from its issue until out_valid.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inflight  <= 1'b0;
      rnd_blank <= 1'b0;
    end else if (PIPE) begin
      inflight <= (inflight && !rnd_valid) || issue;
      if (issue) rnd_blank <= blank_sel;
    end
  end

  assign done_blank = rnd_valid && (PIPE ? rnd_blank : blank_sel);

  // Chaining register H.
  always_ff @(posedge clk) begin
    if (!rst_n)                        h_q <= IV;
    else if (start && state == S_IDLE) h_q <= IV;
    else if (rnd_valid)                h_q <= h_next;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else if (done_blank) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE:  if (start) state <= S_MSG;
        S_MSG:   if (issue && pad_last) state <= S_BLANK;
        S_BLANK: if (issue) state <= S_FIN;
        S_FIN:   ;
        default: state <= S_IDLE;
      endcase
    end
  end

  luffa_zout u_zout (.clk(clk), .rst_n(rst_n), .load(done_blank), .h(h_next), .z(z));

  always_ff @(posedge clk) begin
    if (!rst_n) z_valid <= 1'b0;
    else        z_valid <= done_blank;
  end

  assign busy = (state != S_IDLE);
endmodule
