// tb_luffa_mult2: self-checking testbench for luffa_mult2.
//
// Checks multiplication by 2 on random blocks and on single-word inputs in a7 (the reduction path).
// Random inputs are applied and every output is compared with the
// functional model in luffa_ref_pkg; a watchdog ends the run if it hangs.
module tb_luffa_mult2;
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

  blk_t a, y;
  luffa_mult2 dut (.a(a), .y(y));
  initial begin
    for (int i = 0; i < 200; i++) begin
      a = rand_blk();
      if (i < 8) begin a = '0; a[7] = 32'h1 << i; end
      @(posedge clk);
      checks++;
      if (y !== mul2(a)) begin failures++; $display("mult2 mismatch %h -> %h", a, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
