// tb_luffa_step: self-checking testbench for luffa_step.
//
// Checks single steps of Q_0, Q_1 and Q_2 with logic and RAM S-boxes.
// Random inputs are applied and every output is compared with the
// functional model in luffa_ref_pkg; a watchdog ends the run if it hangs.
module tb_luffa_step;
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
  luffa_step #(.J(0), .R(0), .SBOX_RAM(1'b0)) d0 (.a(a), .y(y0));
  luffa_step #(.J(1), .R(5), .SBOX_RAM(1'b1)) d1 (.a(a), .y(y1));
  luffa_step #(.J(2), .R(7), .SBOX_RAM(1'b0)) d2 (.a(a), .y(y2));
  initial begin
    for (int i = 0; i < 200; i++) begin
      a = rand_blk();
      @(posedge clk);
      checks += 3;
      if (y0 !== step(0, 0, a)) begin failures++; $display("step 0/0 mismatch"); end
      if (y1 !== step(1, 5, a)) begin failures++; $display("step 1/5 mismatch"); end
      if (y2 !== step(2, 7, a)) begin failures++; $display("step 2/7 mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
