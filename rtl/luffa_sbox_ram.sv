// luffa_sbox_ram: one 16-entry x 4-bit memory holding the Luffa S-box.
//
// In the RAM variant of the design every S-box of SubCrumb is one such
// small memory instead of general logic. The array is filled from the S-box
// table when the design starts (an FPGA loads it with the bitstream) and
// has no write port. The read is asynchronous, so replacing the logic
// S-box with this memory does not change the round timing; the read timing
// is this design's choice.
module luffa_sbox_ram
  import luffa_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 4
)(
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         data
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = WIDTH'(SBOX[i % 16]);
  end

  assign data = mem[addr];
endmodule
