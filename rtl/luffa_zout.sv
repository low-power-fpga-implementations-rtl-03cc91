// luffa_zout: the output stage. The three 256-bit lanes coming out of the
// round are XORed and the sum is stored in the 256-bit Z register when load
// is high (at the end of the blank round). Z keeps its value otherwise.
module luffa_zout
  import luffa_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  state_t h,
  output blk_t   z
);
  always_ff @(posedge clk) begin
    if (!rst_n)    z <= '0;
    else if (load) z <= h[0] ^ h[1] ^ h[2];
  end
endmodule
