// tb_luffa_addconstant: self-checking testbench for luffa_addconstant.
//
// Checks AddConstant for several lane/step pairs, including lane 2 step 7.
// Random inputs are applied and every output is compared with the
// functional model in luffa_ref_pkg; a watchdog ends the run if it hangs.
module tb_luffa_addconstant;
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

  blk_t a, y00, y13, y27;
  luffa_addconstant #(.J(0), .R(0)) d00 (.a(a), .y(y00));
  luffa_addconstant #(.J(1), .R(3)) d13 (.a(a), .y(y13));
  luffa_addconstant #(.J(2), .R(7)) d27 (.a(a), .y(y27));
  function automatic blk_t ac(int j, int r, blk_t x);
    blk_t y = x;
    y[0] = x[0] ^ RC0[j][r];
    y[4] = x[4] ^ RC4[j][r];
    return y;
  endfunction
  initial begin
    for (int i = 0; i < 100; i++) begin
      a = (i == 0) ? '0 : rand_blk();
      @(posedge clk);
      checks += 3;
      if (y00 !== ac(0, 0, a)) failures++;
      if (y13 !== ac(1, 3, a)) failures++;
      if (y27 !== ac(2, 7, a)) failures++;
      // the zero input shows the constants themselves
      if (i == 0) begin
        checks++;
        if (y00[0] !== 32'h303994a6 || y00[4] !== 32'he0337818) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
