// tb_luffa_p: self-checking testbench for luffa_p.
//
// A clock-enable pipelined P is fed random three-lane states while a
// one-hot enable walks through its eight register stages; all three lanes
// are compared with Q_0, Q_1, Q_2 of the functional model in luffa_ref_pkg.
// (A one-cycle P compiles very slowly in Verilator; one-cycle Q_j are
// checked in tb_luffa_q.)
module tb_luffa_p;
  import luffa_pkg::*;
  import luffa_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  state_t x, yg;
  logic [7:0] en;

  luffa_p #(.TECH(LUFFA_GATING))       d_gate (.clk(clk), .en(en),    .x(x), .y(yg));

  initial begin
    en = '0;
    for (int t = 0; t < 30; t++) begin
      for (int j = 0; j < 3; j++) x[j] = rand_blk();
      #1;
      for (int s = 0; s < 8; s++) begin
        en = 8'(1) << s;
        @(posedge clk);
        #1;
      end
      en = '0;
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (yg[j] !== q(j, x[j])) begin failures++; $display("P gating lane %0d", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
