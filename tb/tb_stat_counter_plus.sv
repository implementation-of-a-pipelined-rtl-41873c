// tb_stat_counter_plus: checks the counter bank: the clearing sweep after
// reset (busy for exactly 256 cycles, all counters zero), random increments
// including back-to-back hits on one counter, reads of a counter whose
// increment is still being written, and the one-cycle read latency.
module tb_stat_counter_plus;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        busy, inc_valid = 1'b0, rd_valid = 1'b0, rd_data_valid;
  logic [7:0]  inc_addr = '0, rd_addr = '0;
  logic [31:0] rd_data;

  stat_counter_plus dut (.clk, .rst, .busy, .inc_valid, .inc_addr, .rd_valid, .rd_addr,
                         .rd_data_valid, .rd_data);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0] m [256];
  int busy_cycles = 0;

  // Drive one cycle: optional increment and optional read. The read sees
  // every increment issued in earlier cycles.
  task automatic step(input logic inc, input logic [7:0] ia, input logic rd, input logic [7:0] ra);
    logic [31:0] exp_v;
    exp_v = m[ra];
    inc_valid = inc; inc_addr = ia; rd_valid = rd; rd_addr = ra;
    @(posedge clk);
    #1;
    if (inc) m[ia] = m[ia] + 1;
    check(rd_data_valid == rd, "rd_data_valid");
    if (rd) check(rd_data == exp_v, $sformatf("counter %02x = %0d exp %0d", ra, rd_data, exp_v));
    inc_valid = 1'b0; rd_valid = 1'b0;
  endtask

  initial begin
    foreach (m[i]) m[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    while (busy) begin @(posedge clk); busy_cycles++; #1; end
    // one counter cleared per cycle
    check(busy_cycles == 256, $sformatf("clearing took %0d cycles", busy_cycles));
    for (int a = 0; a < 256; a++) step(1'b0, 8'h00, 1'b1, 8'(a));
    // same counter back to back, read right behind
    for (int i = 0; i < 50; i++) step(1'b1, 8'hC0, 1'b1, 8'hC0);
    step(1'b0, 8'h00, 1'b1, 8'hC0);
    for (int i = 0; i < 5000; i++) begin
      logic [7:0] a;
      a = ($urandom_range(0, 3) == 0) ? 8'h23 : 8'($urandom_range(0, 255));
      step(1'($urandom_range(0, 1)), a, 1'($urandom_range(0, 1)),
           ($urandom_range(0, 1) == 0) ? a : 8'($urandom));
    end
    for (int a = 0; a < 256; a++) step(1'b0, 8'h00, 1'b1, 8'(a));
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
