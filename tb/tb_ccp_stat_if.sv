// tb_ccp_stat_if: checks the statistics interface: the event number of each
// event kind (cell: 00 & VCI[5:0], SRAM read: 01 & VCI[5:0], SRAM write:
// 10 & VCI[5:0], total: 1100_0000, worked out here from the examples
// x0023 -> 00_100011 and x0045 -> .._000101), reads passed to the counter
// bank, and the counter value returned one cycle later tagged with the word
// index of the read.
module tb_ccp_stat_if;
  import ccp_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        ev_cell = 0, ev_total = 0, ev_sram = 0, ev_sram_rd = 0, rd_valid = 0;
  logic [15:0] ev_vci = '0;
  logic [7:0]  rd_addr = '0;
  widx_t       rd_idx = '0;
  pword_t      ret;
  logic        cnt_inc_valid, cnt_rd_valid, cnt_rd_data_valid = 1'b0;
  logic [7:0]  cnt_inc_addr, cnt_rd_addr;
  word_t       cnt_rd_data = '0;

  ccp_stat_if dut (.clk, .rst, .ev_cell, .ev_total, .ev_sram, .ev_sram_rd, .ev_vci,
                   .rd_valid, .rd_addr, .rd_idx, .ret, .cnt_inc_valid, .cnt_inc_addr,
                   .cnt_rd_valid, .cnt_rd_addr, .cnt_rd_data_valid, .cnt_rd_data);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic       pend = 1'b0;
    widx_t      pend_idx = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // worked examples
    ev_vci = 16'h0023; ev_cell = 1; #1;
    check(cnt_inc_valid && cnt_inc_addr == 8'b00_100011, "cell on x0023");
    ev_cell = 0; ev_sram = 1; ev_sram_rd = 1; #1;
    check(cnt_inc_valid && cnt_inc_addr == 8'b01_100011, "SRAM read on x0023");
    ev_sram_rd = 0; #1;
    check(cnt_inc_valid && cnt_inc_addr == 8'b10_100011, "SRAM write on x0023");
    ev_vci = 16'h0045; #1;
    check(cnt_inc_addr == 8'b10_000101, "SRAM write on x0045");
    ev_sram = 0; ev_total = 1; #1;
    check(cnt_inc_valid && cnt_inc_addr == 8'hC0, "total");
    ev_total = 0; #1;
    check(!cnt_inc_valid, "no event");
    @(posedge clk); #1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int k;
      k = $urandom_range(0, 4);
      ev_cell = (k == 1); ev_total = (k == 2); ev_sram = (k == 3);
      ev_sram_rd = 1'($urandom); ev_vci = 16'($urandom);
      rd_valid = 1'($urandom); rd_addr = 8'($urandom); rd_idx = 4'($urandom);
      // counter bank stand-in: answers the read of the previous cycle
      cnt_rd_data_valid = pend; cnt_rd_data = $urandom;
      #1;
      check(cnt_inc_valid == (k != 0 && k != 4), "event strobe");
      if (k == 1) check(cnt_inc_addr == {2'b00, ev_vci[5:0]}, "cell event number");
      if (k == 2) check(cnt_inc_addr == 8'b1100_0000, "total event number");
      if (k == 3) check(cnt_inc_addr == {ev_sram_rd ? 2'b01 : 2'b10, ev_vci[5:0]}, "SRAM event number");
      check(cnt_rd_valid == rd_valid && (!rd_valid || cnt_rd_addr == rd_addr), "read passed on");
      check(ret.valid == pend, "ret valid");
      if (pend) check(ret.idx == pend_idx && ret.data == cnt_rd_data, "ret tag and value");
      @(posedge clk); #1;
      pend = rd_valid; pend_idx = rd_idx;
    end
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
