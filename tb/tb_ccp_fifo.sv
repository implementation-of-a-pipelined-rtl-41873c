// tb_ccp_fifo: checks the 256x32 FIFO against a queue model: order of words,
// one-cycle read latency, rdata held between reads, count/empty/full, and
// filling it to exactly 256 words.
module tb_ccp_fifo;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        we = 1'b0, re = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic [8:0]  count;
  logic        empty, full;

  ccp_fifo dut (.clk, .rst, .we, .wdata, .re, .rdata, .count, .empty, .full);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0] q [$];
  logic [31:0] exp_rd;
  logic        rd_pend = 1'b0;
  logic        rd_seen = 1'b0;   // rdata is defined once a read has happened

  // One cycle of traffic; the model follows the same rules as the FIFO.
  task automatic step(input logic w, input logic r);
    we = w && q.size() < 256;
    re = r && q.size() > 0;
    wdata = $urandom;
    @(posedge clk);
    #1;
    if (re) begin exp_rd = q.pop_front(); rd_pend = 1'b1; end
    else rd_pend = 1'b0;
    if (we) q.push_back(wdata);
    if (rd_pend) rd_seen = 1'b1;
    if (rd_pend) check(rdata == exp_rd, $sformatf("rdata %08x exp %08x", rdata, exp_rd));
    else if (rd_seen) check(rdata == exp_rd, "rdata held");
    check(count == 9'(q.size()), $sformatf("count %0d exp %0d", count, q.size()));
    check(empty == (q.size() == 0) && full == (q.size() == 256), "flags");
  endtask

  initial begin
    exp_rd = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 300; i++) step(1'b1, 1'b0);     // fill past full
    check(full, "full at 256");
    for (int i = 0; i < 100; i++) step(1'b1, 1'b1);     // read and write together
    for (int i = 0; i < 300; i++) step(1'b0, 1'b1);     // drain
    check(empty, "empty after drain");
    for (int i = 0; i < 3000; i++) step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    we = 1'b0; re = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
