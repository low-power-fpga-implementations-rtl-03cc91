// tb_luffa_top: end-to-end testbench for the Luffa-256 core at its default
// parameters (clock-enable pipelined round, 10 cycles per round).
//
// Hashes messages of many lengths and compares each 256-bit digest with the
// functional model in luffa_ref_pkg. It also checks the rate: a message
// whose padded form is 768 bits (three blocks) must give z_valid four round
// times after its first block is taken (three message rounds and one blank
// round): 40 cycles with a 10-cycle pipelined round, 4 with a one-cycle
// round. It counts the mechanisms it exercises and
// fails if one never happened: padding inside the last block, the extra
// padding-only block, the blank round, and input gaps (msg_valid low while
// the core could take a block).
module tb_luffa_top;
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

  logic        start, msg_valid, msg_ready, busy, z_valid;
  logic [63:0] n;
  blk_t        msg_data, z;

  luffa_top dut (.clk(clk), .rst_n(rst_n), .start(start), .n(n),
    .msg_valid(msg_valid), .msg_ready(msg_ready), .msg_data(msg_data),
    .busy(busy), .z_valid(z_valid), .z(z));

  int n_partial = 0, n_extra = 0, n_blank = 0, n_gap = 0;

  // Hash one message; gaps != 0 inserts random msg_valid gaps. Returns the
  // number of cycles from the first accepted block to z_valid.
  task automatic hash_one(longint unsigned len, bit gaps, output int cycles);
    blk_t msg [];
    blk_t exp;
    int nin = int'((len + 255) / 256);
    int taken = 0, guard = 0, first = -1, cyc = 0;
    bit got = 0;
    msg = new[nin];
    foreach (msg[i]) msg[i] = rand_blk();
    exp = hash(msg, len);
    if (len % 256 != 0) n_partial++; else n_extra++;
    #1 start = 1'b1; n = len;
    @(posedge clk);
    #1 start = 1'b0;
    cycles = -1;
    while (!got && guard < 5000) begin
      guard++;
      msg_valid = (taken < nin) && (!gaps || $urandom_range(2) != 0);
      msg_data  = (taken < nin) ? msg[taken] : rand_blk();
      #1;
      if (!msg_valid && msg_ready) n_gap++;
      if (msg_valid && msg_ready) begin
        if (first < 0) first = cyc;
        taken++;
      end
      @(posedge clk);
      cyc++;
      #1;
      if (z_valid) begin
        got = 1;
        n_blank++;
        cycles = cyc - first;
        checks++;
        if (z !== exp) begin
          failures++;
          $display("n=%0d digest %h expected %h", len, z, exp);
        end
      end
    end
    msg_valid = 1'b0;
    checks++;
    if (!got) begin failures++; $display("n=%0d no digest", len); end
    checks++;
    if (taken != nin) begin failures++; $display("n=%0d took %0d blocks", len, taken); end
    @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("n=%0d still busy", len); end
  endtask

  initial begin
    int c;
    int lat = (dut.TECH == LUFFA_POSITIVE || dut.TECH == LUFFA_GATING) ? PIPE_LAT : 1;
    // edges from the one that takes the first block to the one that sets
    // z_valid, counting both: 4 for one-cycle rounds; 4*10 + 1 pipelined
    int exp_c = (lat == 1) ? 4 : 4 * lat + 1;
    start = 0; msg_valid = 0; n = '0; msg_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // rate: 600-bit message pads to 768 bits = 3 blocks, plus a blank round
    hash_one(600, 0, c);
    checks++;
    if (c != exp_c) begin failures++; $display("768-bit padded message took %0d cycles", c); end
    $display("768-bit padded message: %0d cycles from first block to digest", c);
    hash_one(512, 0, c);   // two blocks and the extra padding block
    checks++;
    if (c != exp_c) begin failures++; $display("512-bit message took %0d cycles", c); end
    hash_one(0, 0, c);
    hash_one(1, 1, c);
    hash_one(255, 1, c);
    hash_one(256, 1, c);
    hash_one(257, 1, c);
    for (int i = 0; i < 20; i++) hash_one(longint'($urandom_range(3000)), 1, c);
    checks += 4;
    if (n_partial == 0) begin failures++; $display("no partial last block"); end
    if (n_extra == 0)   begin failures++; $display("no extra padding block"); end
    if (n_blank == 0)   begin failures++; $display("no blank round"); end
    if (n_gap == 0)     begin failures++; $display("no input gap"); end
    $display("partial %0d, extra padding block %0d, blank rounds %0d, input gaps %0d",
             n_partial, n_extra, n_blank, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
