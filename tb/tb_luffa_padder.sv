// tb_luffa_padder: self-checking testbench for luffa_padder.
//
// Messages of many lengths (0, 1, 255, 256, 257, 512, 600, 768 and random)
// are fed with random gaps on msg_valid and random back-pressure on
// out_ready. Every padded block is compared with the model's padding, the
// number of blocks taken and produced is checked (ceil(n/256) in,
// floor(n/256)+1 out), and out_last must mark exactly the final block.
// Counts how often the extra all-padding block and back-pressure occurred.
module tb_luffa_padder;
  import luffa_pkg::*;
  import luffa_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        start, msg_valid, msg_ready, out_valid, out_ready, out_last, busy;
  logic [63:0] n;
  blk_t        msg_data, out_data;

  luffa_padder dut (.clk(clk), .rst_n(rst_n), .start(start), .n(n),
    .msg_valid(msg_valid), .msg_ready(msg_ready), .msg_data(msg_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .out_last(out_last), .busy(busy));

  int n_extra = 0, n_stall = 0;

  task automatic run(longint unsigned len);
    blk_t msg [];
    int nin = int'((len + 255) / 256);
    int nout = int'(len / 256) + 1;
    int taken = 0, given = 0, guard = 0;
    msg = new[nin];
    foreach (msg[i]) msg[i] = rand_blk();
    #1 start = 1'b1; n = len;
    @(posedge clk);
    #1 start = 1'b0;
    while (busy && guard < 1000) begin
      guard++;
      msg_valid = (taken < nin) && ($urandom_range(3) != 0);
      msg_data  = (taken < nin) ? msg[taken] : rand_blk();
      out_ready = ($urandom_range(3) != 0);
      #1;
      if (msg_valid && !out_ready) n_stall++;
      if (out_valid && out_ready) begin
        checks += 2;
        if (out_data !== pad_block(msg, len, given)) begin
          failures++; $display("n=%0d block %0d mismatch", len, given);
        end
        if (out_last !== (given == nout - 1)) begin
          failures++; $display("n=%0d block %0d last flag wrong", len, given);
        end
        if (given >= nin) n_extra++;
        given++;
      end
      if (msg_valid && msg_ready) taken++;
      @(posedge clk);
      #1;
    end
    msg_valid = 1'b0;
    checks += 2;
    if (taken != nin) begin failures++; $display("n=%0d took %0d blocks", len, taken); end
    if (given != nout) begin failures++; $display("n=%0d gave %0d blocks", len, given); end
  endtask

  initial begin
    start = 0; msg_valid = 0; out_ready = 0; n = '0; msg_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(0); run(1); run(255); run(256); run(257); run(512); run(600); run(768);
    for (int i = 0; i < 40; i++) run(longint'($urandom_range(2000)));
    checks += 2;
    if (n_extra == 0) begin failures++; $display("extra block never produced"); end
    if (n_stall == 0) begin failures++; $display("back-pressure never seen"); end
    $display("extra blocks %0d, back-pressure cycles %0d", n_extra, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
