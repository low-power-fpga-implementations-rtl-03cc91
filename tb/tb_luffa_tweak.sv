// tb_luffa_tweak: self-checking testbench for luffa_tweak.
//
// Checks the tweak of Q_0, Q_1 and Q_2 (rotation of a4..a7 by 0, 1 and 2).
// Random inputs are applied and every output is compared with the
// functional model in luffa_ref_pkg; a watchdog ends the run if it hangs.
module tb_luffa_tweak;
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

  blk_t a, y0, y1, y2;
  luffa_tweak #(.J(0)) d0 (.a(a), .y(y0));
  luffa_tweak #(.J(1)) d1 (.a(a), .y(y1));
  luffa_tweak #(.J(2)) d2 (.a(a), .y(y2));
  initial begin
    for (int i = 0; i < 200; i++) begin
      a = rand_blk();
      @(posedge clk);
      checks += 3;
      if (y0 !== tweak(0, a)) begin failures++; $display("tweak0 mismatch"); end
      if (y1 !== tweak(1, a)) begin failures++; $display("tweak1 mismatch"); end
      if (y2 !== tweak(2, a)) begin failures++; $display("tweak2 mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
