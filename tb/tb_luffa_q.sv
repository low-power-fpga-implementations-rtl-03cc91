// tb_luffa_q: self-checking testbench for luffa_q.
//
// Four instances, one per technique: conventional (Q_0, combinational),
// positive pipeline (Q_1, eight rising-edge registers, result after eight
// edges), clock-enable pipeline (Q_2, a one-hot enable walks through the
// eight registers; registers without enable must hold) and negative-edge
// register (Q_1, result within the same clock period). Results are compared
// with the functional model in luffa_ref_pkg.
module tb_luffa_q;
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

  blk_t a, yc, yp, yg, yn, a_held;
  logic [7:0] en;

  luffa_q #(.J(0), .TECH(LUFFA_CONVENTIONAL)) d_conv (.clk(clk), .en(8'h00), .a(a), .y(yc));
  luffa_q #(.J(1), .TECH(LUFFA_POSITIVE))     d_pos  (.clk(clk), .en(8'h00), .a(a), .y(yp));
  luffa_q #(.J(2), .TECH(LUFFA_GATING))       d_gate (.clk(clk), .en(en),    .a(a), .y(yg));
  luffa_q #(.J(1), .TECH(LUFFA_NEGATIVE), .SBOX_RAM(1'b1)) d_neg (.clk(clk), .en(8'h00), .a(a), .y(yn));

  task automatic chk(string what, blk_t got, blk_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s mismatch", what); end
  endtask

  initial begin
    en = '0;
    a  = rand_blk();
    @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      // new input just after a rising edge
      #1 a = rand_blk();
      a_held = a;
      #0 chk("conventional", yc, q(0, a));
      @(posedge clk);                       // falling edge passed in between
      chk("negative-edge", yn, q(1, a_held));
      // positive pipeline: keep a for eight edges
      repeat (8) @(posedge clk);
      chk("positive", yp, q(1, a_held));
      // gating pipeline: walk the enable through the stages while the
      // input changes; only the enabled stage may load
      for (int s = 0; s < 8; s++) begin
        #1 en = 8'(1) << s;
        if (s > 0) a = rand_blk();          // must not reach stage 0 again
        @(posedge clk);
      end
      #1 en = '0;
      chk("gating", yg, q(2, a_held));
      a = rand_blk();
      repeat (3) @(posedge clk);
      chk("gating hold", yg, q(2, a_held));
      a = a_held;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
