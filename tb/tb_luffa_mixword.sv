// tb_luffa_mixword: self-checking testbench for luffa_mixword.
//
// Checks MixWord on random word pairs and on single set bits.
// Random inputs are applied and every output is compared with the
// functional model in luffa_ref_pkg; a watchdog ends the run if it hangs.
module tb_luffa_mixword;
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

  word_t xk, xk4, yk, yk4, ek, ek4;
  luffa_mixword dut (.xk(xk), .xk4(xk4), .yk(yk), .yk4(yk4));
  initial begin
    for (int i = 0; i < 300; i++) begin
      xk = $urandom; xk4 = $urandom;
      if (i < 32) begin xk = 32'h1 << i; xk4 = 0; end
      @(posedge clk);
      ek = xk; ek4 = xk4;
      mixword(ek, ek4);
      checks++;
      if ({yk, yk4} !== {ek, ek4}) begin failures++; $display("MixWord mismatch %h %h", xk, xk4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
