// tb_ccp_fsm: checks the CCP FSM driving a real pipeline, with the input
// FIFO, the SRAM devices and the counter bank replaced by simple models. For
// a stream of pass-through and control cells it compares, in order: the
// statistics events (kind and VCI), the SRAM accesses (device, direction,
// address, write data), the statistics reads (counter number and target
// word), and the words leaving the last pipeline register (with the response
// opcode). It also checks that the pipeline freezes while a grant is
// withheld, that a changed VCI is used for later cells, and that no cell is
// admitted while the output side reports 18 cells. The freeze look-ahead
// (quiet) is checked as a promise: no freeze may come inside a window it
// announced.
module tb_ccp_fsm;
  import ccp_pkg::*;
  import tb_ccp_pkg::cell_t;
  import tb_ccp_pkg::mk_cell;
  import tb_ccp_pkg::ref_hec;
  import tb_ccp_pkg::sram_cmd;
  import tb_ccp_pkg::stat_cmd;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_cell_avail, in_fifo_re, in_cell_start, in_cell_done;
  word_t       in_fifo_rdata = '0;
  logic        stat_busy = 1'b1;
  logic [5:0]  out_cells_held = '0;
  logic        adv, freeze_pipe, start_write_fifo_out;
  pword_t      pipe_in, patch_op;
  pword_t      stage [14];
  pword_t      patch [3];
  logic [1:0]  sram_want, sram_granted = '0;
  logic        acc_valid, acc_dev, acc_we;
  logic [18:0] acc_addr;
  word_t       acc_wdata;
  widx_t       acc_idx, st_rd_idx;
  logic        ev_cell, ev_total, ev_sram, ev_sram_rd, st_rd_valid;
  logic [15:0] ev_vci, vci_reg;
  logic [7:0]  st_rd_addr;
  logic [3:0]  quiet;

  ccp_fsm dut (.clk, .rst, .in_cell_avail, .in_fifo_re, .in_fifo_rdata, .in_cell_start,
               .in_cell_done, .stat_busy, .out_cells_held, .adv, .pipe_in, .stage, .patch_op,
               .sram_want, .sram_granted, .acc_valid, .acc_dev, .acc_we, .acc_addr, .acc_wdata,
               .acc_idx, .ev_cell, .ev_total, .ev_sram, .ev_sram_rd, .ev_vci, .st_rd_valid,
               .st_rd_addr, .st_rd_idx, .start_write_fifo_out, .freeze_pipe, .quiet, .vci_reg);

  assign patch[0] = patch_op;
  assign patch[1] = '0;
  assign patch[2] = '0;
  ccp_pipeline u_pipe (.clk, .rst, .adv, .in (pipe_in), .patch, .stage);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- input FIFO model ----------------
  word_t fifo [$];
  int    n_loaded = 0, n_started = 0;
  assign in_cell_avail = (n_loaded > n_started);
  always @(posedge clk) if (!rst) begin
    if (in_fifo_re) begin
      if (fifo.size() == 0) check(1'b0, "read of empty FIFO");
      else in_fifo_rdata <= fifo.pop_front();
    end
    if (in_cell_start) n_started++;
  end

  // ---------------- SRAM grant model ----------------
  logic [1:0] block = '0;
  always @(posedge clk) sram_granted <= rst ? '0 : (sram_want & ~block);

  // ---------------- expectations ----------------
  logic [17:0] exp_ev [$];     // {kind, vci}: 0 cell, 1 total, 2 SRAM read, 3 SRAM write
  logic [52:0] exp_acc [$];    // {dev, we, addr, wdata}
  logic [11:0] exp_rd [$];     // {counter, word index}
  word_t       exp_out [$];
  logic [15:0] m_vci = 16'h0023;
  int n_frz = 0, n_swr = 0, n_held_off = 0, n_cells_out = 0, n_vci = 0;

  task automatic load(input cell_t c);
    logic [15:0] vci;
    logic hit, ok;
    logic [7:0] op;
    cell_t o;
    o = c;
    vci = c[0][19:4];
    op  = c[2][23:16];
    hit = (vci == m_vci) || (vci[15:4] == 12'h004);
    ok  = hit && ref_hec(c[0]) == c[1][31:24] && c[2][31:24] == 8'h01 &&
          (op == 8'h12 || op == 8'h14 || op == 8'h18);
    if (hit) exp_ev.push_back({2'd0, vci});
    exp_ev.push_back({2'd1, 16'h0});
    if (ok) begin
      o[2][23:16] = op + 1;
      if (op == 8'h12) begin m_vci = c[3][31:16]; n_vci++; end
      if (op == 8'h14) begin
        int n;
        n = int'(c[3][29:27]) + 1;
        exp_ev.push_back({c[3][31] ? 2'd2 : 2'd3, vci});
        for (int i = 0; i < n; i++)
          exp_acc.push_back({c[3][30], !c[3][31], 19'(c[3][18:0] + 19'(i)), c[4+i]});
      end
      if (op == 8'h18) begin
        if (c[3][31]) exp_rd.push_back({c[3][16:9], 4'd4});
        if (c[7][31]) exp_rd.push_back({c[7][16:9], 4'd8});
      end
    end
    for (int i = 0; i < 14; i++) begin
      fifo.push_back(c[i]);
      exp_out.push_back(o[i]);
    end
    n_loaded++;
  endtask

  // ---------------- monitors ----------------
  longint m_cyc = 0, safe_until = -1;
  int     n_q_long = 0;
  always @(posedge clk) if (!rst) begin
    m_cyc++;
    if (m_cyc + longint'(quiet) - 1 > safe_until) safe_until = m_cyc + longint'(quiet) - 1;
    check(!(freeze_pipe && m_cyc <= safe_until), "freeze inside an announced quiet window");
    if (quiet >= 4'd10) n_q_long++;
    if (freeze_pipe) n_frz++;
    check(adv == !freeze_pipe, "adv is the inverse of freeze_pipe");
    if (freeze_pipe) check(sram_want != 0 && (sram_want & sram_granted) == 0,
                           "freeze only while waiting for a grant");
    if (ev_cell || ev_total || ev_sram) begin
      logic [17:0] got;
      got = ev_cell ? {2'd0, ev_vci} : ev_total ? {2'd1, 16'h0} : {ev_sram_rd ? 2'd2 : 2'd3, ev_vci};
      if (exp_ev.size() == 0) check(1'b0, "unexpected event");
      else check(got == exp_ev.pop_front(), $sformatf("event %05x", got));
    end
    if (acc_valid) begin
      if (exp_acc.size() == 0) check(1'b0, "unexpected SRAM access");
      else check({acc_dev, acc_we, acc_addr, acc_wdata} == exp_acc.pop_front(), "SRAM access");
      check(sram_granted[acc_dev], "access only with grant");
      if (acc_we) n_swr++;
    end
    if (st_rd_valid) begin
      if (exp_rd.size() == 0) check(1'b0, "unexpected counter read");
      else check({st_rd_addr, st_rd_idx} == exp_rd.pop_front(), "counter read");
    end
    if (adv && stage[13].valid) begin
      if (exp_out.size() == 0) check(1'b0, "unexpected word out");
      else check(stage[13].data == exp_out.pop_front(), "word leaving the pipeline");
      check(start_write_fifo_out == (stage[13].idx == 0), "start_write_fifo_out on word 0");
      if (stage[13].idx == 0) n_cells_out++;
    end
    if (out_cells_held >= 18 && in_cell_avail) begin
      n_held_off++;
      check(!in_cell_start, "admitted with 18 cells at the output");
    end
  end

  word_t p [10];
  task automatic rndp();
    for (int i = 0; i < 10; i++) p[i] = $urandom;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);
    #1 stat_busy = 1'b0;
    // one of each
    rndp(); load(mk_cell(16'h0999, 8'h01, 8'h14, p));
    rndp(); p[0] = sram_cmd(1'b0, 1'b0, 4, 19'h00010); load(mk_cell(16'h0041, 8'h01, 8'h14, p));
    rndp(); p[0] = sram_cmd(1'b1, 1'b1, 8, 19'h00020); load(mk_cell(16'h0023, 8'h01, 8'h14, p));
    rndp(); p[0] = stat_cmd(1'b1, 8'h41); p[4] = stat_cmd(1'b1, 8'hC0); load(mk_cell(16'h004A, 8'h01, 8'h18, p));
    rndp(); p[0] = {16'h0123, 16'h0}; load(mk_cell(16'h0023, 8'h01, 8'h12, p));
    rndp(); load(mk_cell(16'h0023, 8'h01, 8'h18, p));                 // old VCI now passes
    rndp(); p[0] = stat_cmd(1'b1, 8'h23); load(mk_cell(16'h0123, 8'h01, 8'h18, p));
    rndp(); load(mk_cell(16'h0042, 8'h01, 8'h14, p, 1'b1));           // bad HEC
    rndp(); load(mk_cell(16'h0042, 8'h05, 8'h14, p));                 // other module
    repeat (200) @(posedge clk); #1;
    // grant withheld for a while
    block = 2'b11;
    rndp(); p[0] = sram_cmd(1'b0, 1'b1, 5, 19'h00300); load(mk_cell(16'h0044, 8'h01, 8'h14, p));
    rndp(); p[0] = sram_cmd(1'b1, 1'b0, 2, 19'h00300); load(mk_cell(16'h0044, 8'h01, 8'h14, p));
    repeat (60) @(posedge clk); #1;
    block = 2'b00;
    repeat (100) @(posedge clk); #1;
    // output side full: nothing admitted
    out_cells_held = 6'd18;
    rndp(); load(mk_cell(16'h0999, 8'h01, 8'h14, p));
    repeat (30) @(posedge clk); #1;
    check(n_started == n_loaded - 1, "cell held back");
    out_cells_held = 6'd0;
    repeat (60) @(posedge clk); #1;
    // random stream with random grant holds
    for (int k = 0; k < 60; k++) begin
      logic [15:0] v;
      v = ($urandom_range(0, 4) == 0) ? 16'($urandom) : 16'h0040 + 16'($urandom_range(0, 15));
      rndp();
      if ($urandom_range(0, 1)) p[0] = sram_cmd(1'($urandom), 1'($urandom), $urandom_range(1, 8), 19'($urandom));
      else begin p[0] = stat_cmd(1'($urandom), 8'($urandom)); p[4] = stat_cmd(1'($urandom), 8'($urandom)); end
      load(mk_cell(v, 8'h01, ($urandom_range(0, 1)) ? 8'h14 : 8'h18, p));
    end
    repeat (1500) begin
      @(posedge clk); #1;
      block = ($urandom_range(0, 9) == 0) ? 2'($urandom) : block;
    end
    block = 2'b00;
    repeat (100) @(posedge clk); #1;
    check(exp_out.size() == 0 && exp_ev.size() == 0 && exp_acc.size() == 0 && exp_rd.size() == 0,
          "all expectations met");
    check(n_cells_out == n_loaded, $sformatf("%0d cells out of %0d", n_cells_out, n_loaded));
    check(vci_reg == 16'h0123, "VCI register");
    check(n_frz > 0 && n_swr > 0 && n_held_off > 0 && n_vci > 0 && n_q_long > 0, "coverage");
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
