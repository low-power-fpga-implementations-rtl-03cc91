// tb_luffa_mi: self-checking testbench for luffa_mi.
//
// Checks X_j = H_j ^ 2(H0^H1^H2) ^ 2^j M on random blocks.
// Random inputs are applied and every output is compared with the
// functional model in luffa_ref_pkg; a watchdog ends the run if it hangs.
module tb_luffa_mi;
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

  blk_t m;
  state_t h, x, e;
  luffa_mi dut (.m(m), .h(h), .x(x));
  initial begin
    for (int i = 0; i < 200; i++) begin
      m = rand_blk();
      for (int j = 0; j < 3; j++) h[j] = rand_blk();
      @(posedge clk);
      e = mi(m, h);
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (x[j] !== e[j]) begin failures++; $display("MI lane %0d mismatch", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
