// tb_ccp_out_fifo_fsm: checks the output FIFO FSM together with a 256x32
// FIFO: cells written from the pipeline (with freeze cycles in the middle)
// leave whole, in order, on consecutive cycles with SOC on word 0; queued
// cells leave back to back, 14 cycles SOC to SOC; no cell starts while
// tca_in_int is high; cells_held counts from the write start to the send
// start. The freeze look-ahead (quiet) is driven from each cell's freeze
// schedule, sometimes understated; a cell written without freezes must start
// leaving two cycles after its first word is written (cut-through).
module tb_ccp_out_fifo_fsm;
  import ccp_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic  start_write_fifo_out = 1'b0, freeze_pipe = 1'b0, tca_in_int = 1'b0;
  logic [3:0] quiet = 4'd0;
  word_t pipe_word = '0, fifo_wdata, fifo_rdata, d_out_int;
  logic  fifo_we, fifo_re, soc_out_int;
  logic [5:0] cells_held;

  ccp_out_fifo_fsm dut (.clk, .rst, .start_write_fifo_out, .freeze_pipe, .quiet, .pipe_word,
                        .fifo_we, .fifo_wdata, .fifo_re, .fifo_rdata, .tca_in_int,
                        .d_out_int, .soc_out_int, .cells_held);
  ccp_fifo u_fifo (.clk, .rst, .we (fifo_we), .wdata (fifo_wdata), .re (fifo_re),
                   .rdata (fifo_rdata), .count (), .empty (), .full ());

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  word_t  exp_w [$];
  int     m_held = 0;
  int     n_sent_cells = 0, n_rx_cells = 0, n_b2b = 0, n_frz = 0, n_tca = 0;
  int     rx_i = -1;
  longint cyc = 0, last_soc = -100, last_sw = -100;
  logic   chk_cut = 1'b0;
  int     n_cut = 0;
  logic   tca_q = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    tca_q <= tca_in_int;
    if (!rst) begin
      if (start_write_fifo_out) last_sw = cyc;
      if (soc_out_int) begin
        if (cyc - last_sw < 14) n_cut++;
        if (chk_cut) check(cyc - last_sw == 2, $sformatf("cut-through start %0d", cyc - last_sw));
        check(rx_i < 0, "SOC inside a cell");
        check(!tca_q, "cell started while tca_in_int high");
        check(cyc - last_soc >= 14, "cells closer than 14");
        if (cyc - last_soc == 14) n_b2b++;
        last_soc = cyc;
        rx_i = 0;
        m_held--;
      end
      if (rx_i >= 0) begin
        if (exp_w.size() == 0) check(1'b0, "output with nothing expected");
        else check(d_out_int == exp_w.pop_front(), $sformatf("cell %0d word %0d", n_rx_cells, rx_i));
        rx_i++;
        if (rx_i == 14) begin rx_i = -1; n_rx_cells++; end
      end else if (!soc_out_int) check(d_out_int == '0, "idle output is zero");
    end
  end

  // Write one cell as the pipeline would, with random freezes after word 0.
  // quiet announces the freeze-free cycles left in this cell's schedule;
  // with under set it announces a random smaller number.
  task automatic write_cell(input int frz_pct, input bit under = 1'b0);
    bit f [$];
    int w, run;
    w = 0;
    while (w < 14) begin
      f.push_back((w > 0) && ($urandom_range(0, 99) < frz_pct));
      if (!f[$]) w++;
    end
    for (int k = 0; k < f.size(); k++) begin
      run = 0;
      for (int j = k; j < f.size() && !f[j]; j++) run++;
      if (under) run = $urandom_range(0, run);
      quiet = 4'((run > 15) ? 15 : run);
      freeze_pipe = f[k];
      start_write_fifo_out = (k == 0);
      pipe_word = $urandom;
      if (!freeze_pipe) exp_w.push_back(pipe_word);
      else n_frz++;
      if (k == 0) m_held++;
      @(posedge clk); #1;
      // a cell whose SOC is on the output now has already left the count
      check(cells_held == 6'(m_held - int'(soc_out_int)),
            $sformatf("cells_held %0d exp %0d", cells_held, m_held - int'(soc_out_int)));
    end
    start_write_fifo_out = 1'b0; freeze_pipe = 1'b0; quiet = 4'd0;
    n_sent_cells++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    // single cells, no freeze: cut-through
    chk_cut = 1'b1;
    for (int c = 0; c < 3; c++) begin write_cell(0); repeat (30) @(posedge clk); #1; end
    chk_cut = 1'b0;
    // back-to-back writes, receiver ready: cells leave 14 apart
    for (int c = 0; c < 6; c++) write_cell(0);
    repeat (40) @(posedge clk); #1;
    check(n_b2b >= 5, $sformatf("back-to-back departures %0d", n_b2b));
    // receiver stopped: cells accumulate
    tca_in_int = 1'b1;
    for (int c = 0; c < 12; c++) write_cell(20);
    repeat (20) begin @(posedge clk); #1; n_tca++; end
    check(n_rx_cells == 9, "nothing left while tca_in_int high");
    check(cells_held == 12, "12 cells held");
    tca_in_int = 1'b0;
    repeat (200) @(posedge clk); #1;
    // random
    fork
      for (int c = 0; c < 40; c++) write_cell($urandom_range(0, 40), 1'($urandom));
      repeat (700) begin
        @(posedge clk); #1;
        if ($urandom_range(0, 19) == 0) tca_in_int = !tca_in_int;
      end
    join
    tca_in_int = 1'b0;
    repeat (600) @(posedge clk); #1;
    check(n_rx_cells == n_sent_cells, $sformatf("%0d cells out of %0d", n_rx_cells, n_sent_cells));
    check(exp_w.size() == 0 && cells_held == 0, "drained");
    check(n_frz > 0 && n_tca > 0 && n_cut > 5, $sformatf("coverage, %0d cut-through", n_cut));
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
