// luffa_padder: pads a message of n bits and delivers it as 256-bit blocks.
//
// Padding: one '1' bit after the last message bit, then zeros up to the end
// of the 256-bit block. A message whose length is a multiple of 256 (zero
// included) gets an extra block 1000...0. Message bits are taken MSB first:
// bit 255 of the first block is the first message bit. This is the padding
// of the Luffa algorithm; its hardware form here is this design's own.
//
// Interface: a start pulse while idle samples n. The padder then asks for
// ceil(n/256) message blocks on msg_valid/msg_ready and forwards each,
// padded where needed, on out_valid/out_ready; out_last marks the final
// padded block. The data path is combinational (a block passes in the cycle
// it is accepted) and the extra block, if any, follows on the next transfer.
module luffa_padder
  import luffa_pkg::*;
#(
  parameter int unsigned N_W = 64
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] n,
  input  logic           msg_valid,
  output logic           msg_ready,
  input  blk_t           msg_data,
  output logic           out_valid,
  input  logic           out_ready,
  output blk_t           out_data,
  output logic           out_last,
  output logic           busy
);
  typedef enum logic [1:0] {P_IDLE, P_DATA, P_EXTRA} pstate_e;

  pstate_e        state;
  logic [N_W-1:0] rem;       // message bits not yet delivered
  logic           partial;   // the current block ends inside the message
  logic [7:0]     tail;      // message bits in the final, partial block

  assign partial = (rem < N_W'(BLK));
  assign tail    = rem[7:0];

  always_comb begin
    msg_ready = 1'b0;
    out_valid = 1'b0;
    out_last  = 1'b0;
    out_data  = msg_data;
    unique case (state)
      P_DATA: begin
        msg_ready = out_ready;
        out_valid = msg_valid;
        out_last  = partial;
        if (partial)
          out_data = (msg_data & ~({BLK{1'b1}} >> tail)) | ({1'b1, {(BLK-1){1'b0}}} >> tail);
      end
      P_EXTRA: begin
        out_valid = 1'b1;
        out_last  = 1'b1;
        out_data  = {1'b1, {(BLK-1){1'b0}}};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= P_IDLE;
      rem   <= '0;
    end else begin
      unique case (state)
        P_IDLE:
          if (start) begin
            rem   <= n;
            state <= (n == '0) ? P_EXTRA : P_DATA;
          end
        P_DATA:
          if (msg_valid && out_ready) begin
            rem <= partial ? '0 : rem - N_W'(BLK);
            if (partial)                 state <= P_IDLE;
            else if (rem == N_W'(BLK))   state <= P_EXTRA;
          end
        P_EXTRA:
          if (out_ready) state <= P_IDLE;
        default: state <= P_IDLE;
      endcase
    end
  end

  assign busy = (state != P_IDLE);
endmodule
