// tb_ccp_in_fifo_fsm: checks the input FIFO FSM: each cell's 14 words are
// written to the FIFO in order from its SOC on; the cell counts follow SOCs
// and the reader's start/done strobes; tca_out_int rises when 18 cells are
// held and falls when one has been read; a cell arriving while 18 are held
// is dropped whole.
module tb_ccp_in_fifo_fsm;
  import ccp_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic  soc_in_int = 1'b0, cell_start = 1'b0, cell_done = 1'b0;
  word_t d_in_int = '0, fifo_wdata;
  logic  fifo_we, cell_avail, tca_out_int;
  logic [5:0] cells_held;

  ccp_in_fifo_fsm dut (.clk, .rst, .soc_in_int, .d_in_int, .fifo_we, .fifo_wdata,
                       .cell_start, .cell_done, .cell_avail, .tca_out_int, .cells_held);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  word_t exp_w [$];       // words that must reach the FIFO
  int    m_held = 0, m_avail = 0, n_drop = 0, n_tca = 0;

  // FIFO write monitor.
  always @(posedge clk) if (!rst && fifo_we) begin
    if (exp_w.size() == 0) check(1'b0, "unexpected FIFO write");
    else check(fifo_wdata == exp_w.pop_front(), "FIFO word");
  end

  task automatic send_cell(input int gap);
    logic accept;
    accept = (m_held < 18);
    if (accept) m_held++; else n_drop++;
    if (accept) m_avail++;
    for (int i = 0; i < 14; i++) begin
      soc_in_int = (i == 0);
      d_in_int   = $urandom;
      if (accept) exp_w.push_back(d_in_int);
      @(posedge clk); #1;
    end
    soc_in_int = 1'b0;
    repeat (gap) begin @(posedge clk); #1; end
  endtask

  task automatic read_cell();
    cell_start = 1'b1; m_avail--;
    @(posedge clk); #1;
    cell_start = 1'b0;
    repeat (12) begin @(posedge clk); #1; end
    cell_done = 1'b1; m_held--;
    @(posedge clk); #1;
    cell_done = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    check(!tca_out_int && !cell_avail && cells_held == 0, "idle after reset");
    // 20 back-to-back cells, none read: 18 kept, 2 dropped
    for (int c = 0; c < 20; c++) begin
      send_cell(0);
      check(cells_held == 6'(m_held), $sformatf("held %0d exp %0d", cells_held, m_held));
      check(tca_out_int == (m_held >= 18), $sformatf("tca_out_int with %0d held", m_held));
      if (tca_out_int) n_tca++;
    end
    check(n_drop == 2, "two cells dropped");
    check(cell_avail, "cells available");
    // read them back; tca_out_int drops after the first is done
    for (int c = 0; c < 18; c++) begin
      read_cell();
      check(cells_held == 6'(m_held), $sformatf("held %0d exp %0d after read", cells_held, m_held));
      check(tca_out_int == (m_held >= 18), "tca_out_int after read");
      check(cell_avail == (m_avail > 0), "cell_avail after read");
    end
    // reading while writing: start reading one cycle after each SOC
    for (int c = 0; c < 10; c++) begin
      fork
        send_cell($urandom_range(0, 3));
        begin @(posedge clk); #1; read_cell(); end
      join
      check(cells_held == 6'(m_held), "held while streaming");
    end
    repeat (5) @(posedge clk);
    check(exp_w.size() == 0, "all words written");
    check(n_tca > 0, "tca_out_int seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
