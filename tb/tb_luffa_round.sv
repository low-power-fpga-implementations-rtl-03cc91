// tb_luffa_round: self-checking testbench for luffa_round.
//
// One instance for each of the two pipelined techniques (free-running and
// clock-enable registers). Random (m, h) pairs are issued with an in_valid
// pulse, h is held, and the testbench counts the edges to out_valid, which
// must be 10. h_out is compared with the functional model (MI then P) in
// luffa_ref_pkg. The one-cycle techniques are checked at the level of Q_j
// (tb_luffa_q) and of the whole core: Verilator flattens a one-cycle round
// into a single very large expression that takes a long time to compile.
module tb_luffa_round;
  import luffa_pkg::*;
  import luffa_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  blk_t   m;
  state_t h;
  logic   [1:0] iv, ov;
  state_t ho [2];

  luffa_round #(.TECH(LUFFA_POSITIVE)) d1 (.clk(clk), .rst_n(rst_n), .in_valid(iv[0]), .m(m), .h(h), .out_valid(ov[0]), .h_out(ho[0]));
  luffa_round #(.TECH(LUFFA_GATING))   d2 (.clk(clk), .rst_n(rst_n), .in_valid(iv[1]), .m(m), .h(h), .out_valid(ov[1]), .h_out(ho[1]));

  localparam int LAT [2] = '{10, 10};

  initial begin
    state_t e;
    int n;
    iv = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      for (int d = 0; d < 2; d++) begin
        m = rand_blk();
        for (int j = 0; j < 3; j++) h[j] = rand_blk();
        e = round(m, h);
        #1 iv[d] = 1'b1;
        n = 0;
        @(posedge clk);
        while (!ov[d] && n < 40) begin
          #1 iv[d] = 1'b0;
          n++;
          @(posedge clk);
        end
        checks += 2;
        if (n != LAT[d]) begin failures++; $display("tech %0d latency %0d", d, n); end
        if (ho[d] !== e) begin failures++; $display("tech %0d result mismatch", d); end
        #1 iv[d] = 1'b0;
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
