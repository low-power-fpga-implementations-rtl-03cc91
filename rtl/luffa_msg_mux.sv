// luffa_msg_mux: the message multiplexer in front of the round. It passes
// the padded block m^i, or the all-zero block when blank is high (the blank
// round that ends every message). Combinational.
module luffa_msg_mux
  import luffa_pkg::*;
(
  input  logic blank,
  input  blk_t m,
  output blk_t m_out
);
  assign m_out = blank ? blk_t'('0) : m;
endmodule
