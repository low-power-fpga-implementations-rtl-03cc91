// tb_luffa_subcrumb: self-checking testbench for luffa_subcrumb.
//
// Checks both S-box builds (logic network and 16x4 memories) against the S-box table, on all 16 crumbs and on random words.
// Random inputs are applied and every output is compared with the
// functional model in luffa_ref_pkg; a watchdog ends the run if it hangs.
module tb_luffa_subcrumb;
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

  word_t w0, w1, w2, w3, l0, l1, l2, l3, r0, r1, r2, r3, e0, e1, e2, e3;
  luffa_subcrumb #(.SBOX_RAM(1'b0)) d_logic (.w0(w0), .w1(w1), .w2(w2), .w3(w3), .y0(l0), .y1(l1), .y2(l2), .y3(l3));
  luffa_subcrumb #(.SBOX_RAM(1'b1)) d_ram   (.w0(w0), .w1(w1), .w2(w2), .w3(w3), .y0(r0), .y1(r1), .y2(r2), .y3(r3));
  initial begin
    for (int i = 0; i < 300; i++) begin
      if (i < 16) begin
        w0 = {32{i[0]}}; w1 = {32{i[1]}}; w2 = {32{i[2]}}; w3 = {32{i[3]}};
      end else begin
        w0 = $urandom; w1 = $urandom; w2 = $urandom; w3 = $urandom;
      end
      @(posedge clk);
      e0 = w0; e1 = w1; e2 = w2; e3 = w3;
      subcrumb(e0, e1, e2, e3);
      checks += 2;
      if ({l0, l1, l2, l3} !== {e0, e1, e2, e3}) begin failures++; $display("logic S-box mismatch"); end
      if ({r0, r1, r2, r3} !== {e0, e1, e2, e3}) begin failures++; $display("RAM S-box mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
