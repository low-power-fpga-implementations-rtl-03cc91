// tb_luffa_zout: self-checking testbench for luffa_zout. Loads the XOR of
// three random lanes, then checks that Z holds while load is low.
module tb_luffa_zout;
  import luffa_pkg::*;
  import luffa_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  state_t h;
  blk_t   z, e;
  luffa_zout dut (.clk(clk), .rst_n(rst_n), .load(load), .h(h), .z(z));

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (z !== '0) failures++;
    for (int t = 0; t < 50; t++) begin
      for (int j = 0; j < 3; j++) h[j] = rand_blk();
      e = h[0] ^ h[1] ^ h[2];
      load = 1'b1;
      @(posedge clk);
      #1 load = 1'b0;
      for (int j = 0; j < 3; j++) h[j] = rand_blk();
      checks++;
      if (z !== e) begin failures++; $display("Z load mismatch"); end
      @(posedge clk);
      #1;
      checks++;
      if (z !== e) begin failures++; $display("Z did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
