// tb_luffa_sbox_ram: self-checking testbench for luffa_sbox_ram.
//
// Reads all 16 entries of the S-box memory.
// Random inputs are applied and every output is compared with the
// functional model in luffa_ref_pkg; a watchdog ends the run if it hangs.
module tb_luffa_sbox_ram;
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

  logic [3:0] addr, data;
  luffa_sbox_ram dut (.addr(addr), .data(data));
  initial begin
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      @(posedge clk);
      checks++;
      if (data !== S[i]) begin failures++; $display("S[%0d] = %0d", i, data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
