// tb_luffa_msg_mux: self-checking testbench for luffa_msg_mux.
//
// Checks that the block passes when blank is low and zeros come out when it is high.
// Random inputs are applied and every output is compared with the
// functional model in luffa_ref_pkg; a watchdog ends the run if it hangs.
module tb_luffa_msg_mux;
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

  blk_t m, y;
  logic blank;
  luffa_msg_mux dut (.blank(blank), .m(m), .m_out(y));
  initial begin
    for (int i = 0; i < 100; i++) begin
      m = rand_blk();
      blank = i[0];
      @(posedge clk);
      checks++;
      if (y !== (blank ? blk_t'('0) : m)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
