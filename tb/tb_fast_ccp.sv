// tb_fast_ccp: end-to-end test of the control cell processor at its default
// parameters. Sends pass-through cells and control cells of every opcode,
// alone and back to back, and compares every cell that leaves with a
// reference model of the processor kept in this testbench (VCI register,
// counters, SRAM contents). Also checks the cycle counts: 14 cycles from SOC
// to SOC for back-to-back cells of four SRAM writes and of four SRAM reads,
// and the 27-cycle SOC-in to SOC-out delay of an isolated cell. Exercises and
// counts: SRAM grant withheld (pipeline freeze), receiver backpressure
// (tca_in), input FIFO full (tca_out), output FIFO full (admission held),
// VCI change, each failed check, both SRAM devices, statistics reads, and
// cells leaving the output FIFO by cut-through.
module tb_fast_ccp;
  import tb_ccp_pkg::*;

  localparam logic [7:0] MODID   = 8'h01;
  localparam longint     EXP_LAT = 27;    // SOC in to SOC out, isolated cell

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  word_t d_in, d_out;
  logic  soc_in, tca_out, soc_out, tca_in;
  ccp_pkg::sram_out_t sram_out [2];
  logic  sram_gr [2];
  word_t sram_rdata [2];
  logic  block [2];

  fast_ccp dut (
    .clk, .rst, .d_in, .soc_in, .tca_out, .d_out, .soc_out, .tca_in,
    .sram_out, .sram_gr, .sram_rdata
  );

  for (genvar d = 0; d < 2; d++) begin : g_sram
    sram_model #(.DEV(d), .RD_LAT(4)) u_mem (
      .clk, .rst, .block (block[d]), .bus (sram_out[d]), .gr (sram_gr[d]), .rdata (sram_rdata[d])
    );
  end

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- reference model ----------------
  logic [15:0] m_vci = 16'h0023;
  logic [31:0] m_cnt [256];
  word_t       m_mem [int];
  int n_pass_vci, n_pass_hec, n_pass_mod, n_pass_op, n_vci_upd, n_sram_rd, n_sram_wr;
  int n_dev1, n_stat_rd;

  initial foreach (m_cnt[i]) m_cnt[i] = 0;

  function automatic word_t m_read(input logic dev, input logic [18:0] a);
    int key = {13'(dev), a};
    return m_mem.exists(key) ? m_mem[key] : sram_init(int'(dev), a);
  endfunction

  function automatic cell_t model(input cell_t c);
    cell_t o = c;
    logic [15:0] vci = c[0][19:4];
    logic hit = (vci == m_vci) || (vci[15:4] == 12'h004);
    logic [7:0] op = c[2][23:16];
    logic hec_ok = ref_hec(c[0]) == c[1][31:24];
    logic mod_ok = c[2][31:24] == MODID;
    logic op_ok  = op == 8'h12 || op == 8'h14 || op == 8'h18;
    if (hit) m_cnt[{2'b00, vci[5:0]}]++;
    m_cnt[8'hC0]++;
    if (!hit)    begin n_pass_vci++; return o; end
    if (!hec_ok) begin n_pass_hec++; return o; end
    if (!mod_ok) begin n_pass_mod++; return o; end
    if (!op_ok)  begin n_pass_op++;  return o; end
    o[2][23:16] = op + 8'd1;
    case (op)
      8'h12: begin m_vci = c[3][31:16]; n_vci_upd++; end
      8'h14: begin
        logic rd = c[3][31], dev = c[3][30];
        int n = int'(c[3][29:27]) + 1;
        logic [18:0] a = c[3][18:0];
        m_cnt[{rd ? 2'b01 : 2'b10, vci[5:0]}]++;
        if (dev) n_dev1++;
        if (rd) n_sram_rd++; else n_sram_wr++;
        for (int i = 0; i < n; i++) begin
          if (rd) o[4+i] = m_read(dev, a + 19'(i));
          else    m_mem[{13'(dev), 19'(a + 19'(i))}] = c[4+i];
        end
      end
      default: begin
        if (c[3][31]) begin o[4] = m_cnt[c[3][16:9]]; n_stat_rd++; end
        if (c[7][31]) begin o[8] = m_cnt[c[7][16:9]]; n_stat_rd++; end
      end
    endcase
    return o;
  endfunction

  // ---------------- sender ----------------
  // Cells waiting to be sent, and cells expected at the output (parallel queues).
  cell_t  txq [$];
  int     txgap [$];
  logic   txlat [$];
  cell_t  expq [$];
  longint exptin [$];
  logic   explat [$];
  int   n_sent = 0, n_rcvd = 0, n_cut = 0;
  logic tx_busy = 1'b0;

  initial begin
    d_in = '0; soc_in = 1'b0;
    wait (!rst);
    forever begin
      if (txq.size() == 0) begin
        d_in <= '0; soc_in <= 1'b0;
        @(posedge clk);
      end else begin
        cell_t c;
        int    gap;
        logic  lat;
        c   = txq.pop_front();
        gap = txgap.pop_front();
        lat = txlat.pop_front();
        tx_busy = 1'b1;
        if (gap > 0 || tca_out) begin
          d_in <= '0; soc_in <= 1'b0;
        end
        repeat (gap) @(posedge clk);
        while (tca_out) @(posedge clk);
        expq.push_back(model(c));
        exptin.push_back(cycle);
        explat.push_back(lat);
        for (int i = 0; i < 14; i++) begin
          d_in   <= c[i];
          soc_in <= (i == 0);
          @(posedge clk);
        end
        n_sent++;
        tx_busy = 1'b0;
      end
    end
  end

  // ---------------- receiver ----------------
  cell_t  rx;
  int     rx_i = -1;
  longint last_soc = -1;
  int     n_b2b = 0;
  logic   track_rate = 1'b0;
  int     rate_ok = 0, rate_bad = 0;

  always @(posedge clk) if (!rst) begin
    if (soc_out) begin
      check(rx_i < 0, "SOC inside a cell");
      if (last_soc >= 0) begin
        check(cycle - last_soc >= 14, "cells closer than 14 cycles");
        if (cycle - last_soc == 14) n_b2b++;
        if (track_rate && cycle - last_soc < 40) begin   // same burst
          if (cycle - last_soc == 14) rate_ok++; else rate_bad++;
        end
      end
      last_soc = cycle;
      rx_i = 0;
    end
    if (rx_i >= 0) begin
      rx[rx_i] = d_out;
      rx_i++;
      if (rx_i == 14) begin
        rx_i = -1;
        n_rcvd++;
        if (expq.size() == 0) check(0, "unexpected cell");
        else begin
          cell_t  e;
          longint t_in;
          logic   lat;
          e    = expq.pop_front();
          t_in = exptin.pop_front();
          lat  = explat.pop_front();
          for (int i = 0; i < 14; i++)
            check(rx[i] === e[i], $sformatf("cell %0d word %0d got %08x exp %08x", n_rcvd, i, rx[i], e[i]));
          if (lat)
            check(last_soc - t_in == EXP_LAT, $sformatf("latency %0d", last_soc - t_in));
          // 34 cycles is the shortest path if the whole cell is written into
          // the output FIFO first; a shorter one means it left by cut-through
          if (last_soc - t_in < 34) n_cut++;
        end
      end
    end
  end

  // ---------------- mechanism counters (seen at the ports) ----------------
  // freeze:   a device is requested but the grant is withheld
  // tca_in:   the receiver holds cells back while some are waiting
  // tca_out:  the input FIFO reports full
  // out_full: 36 cells inside (18 in each FIFO), so the output FIFO is full
  // cut:      a cell left the output FIFO before it was completely written
  int n_freeze = 0, n_tca_out = 0, n_tca_in = 0, n_out_full = 0;
  logic tca_out_q = 1'b0;
  always @(posedge clk) if (!rst) begin
    for (int d = 0; d < 2; d++)
      if (sram_out[d].req && block[d]) n_freeze++;
    if (tca_out && !tca_out_q) n_tca_out++;
    tca_out_q <= tca_out;
    if (tca_in && expq.size() != 0) n_tca_in++;
    if (n_sent - n_rcvd >= 36) n_out_full++;
  end

  // ---------------- stimulus ----------------
  task automatic put(input cell_t c, input int gap = 0, input logic chk_lat = 1'b0);
    txq.push_back(c);
    txgap.push_back(gap);
    txlat.push_back(chk_lat);
  endtask

  function automatic cell_t ctl(input logic [15:0] vci, input logic [7:0] op, input word_t p [10],
                                input logic [7:0] modid = MODID, input logic bad_hec = 1'b0);
    return mk_cell(vci, modid, op, p, bad_hec);
  endfunction

  task automatic drain();
    while (tx_busy || txq.size() != 0 || expq.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  word_t p [10];

  task automatic rndp();
    for (int i = 0; i < 10; i++) p[i] = $urandom;
  endtask

  initial begin
    tca_in = 1'b0;
    block[0] = 1'b0; block[1] = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (300) @(posedge clk);   // counters clear themselves

    // 1. isolated cells: pass-through and each opcode; check the delay
    rndp(); put(ctl(16'h0100, 8'h14, p), 0, 1'b1);
    rndp(); p[0] = sram_cmd(1'b0, 1'b0, 4, 19'h00100); put(ctl(16'h0041, 8'h14, p), 60, 1'b1);
    rndp(); p[0] = sram_cmd(1'b1, 1'b0, 4, 19'h00100); put(ctl(16'h0041, 8'h14, p), 60, 1'b1);
    rndp(); p[0] = stat_cmd(1'b1, 8'h01); p[4] = stat_cmd(1'b1, 8'h81); put(ctl(16'h0023, 8'h18, p), 60, 1'b1);
    drain();

    // 2. paper workload: back-to-back cells of four SRAM writes, then of four reads
    track_rate = 1'b1;
    for (int k = 0; k < 8; k++) begin
      rndp(); p[0] = sram_cmd(1'b0, 1'(k % 2), 4, 19'(20'h200 + 4*k)); put(ctl(16'h0040 + 16'(k), 8'h14, p));
    end
    drain();
    for (int k = 0; k < 8; k++) begin
      rndp(); p[0] = sram_cmd(1'b1, 1'(k % 2), 4, 19'(20'h200 + 4*k)); put(ctl(16'h0040 + 16'(k), 8'h14, p));
    end
    drain();
    track_rate = 1'b0;
    check(rate_ok == 14 && rate_bad == 0, $sformatf("SOC-to-SOC back to back: %0d at 14, %0d not", rate_ok, rate_bad));

    // 3. failed checks pass through; VCI register change
    rndp(); put(ctl(16'h0042, 8'h14, p, 8'h01, 1'b1));   // bad HEC
    rndp(); put(ctl(16'h0042, 8'h14, p, 8'h07));         // other module
    rndp(); put(ctl(16'h0042, 8'h16, p));                // unknown opcode
    rndp(); p[0] = {16'h0077, 16'h0000}; put(ctl(16'h0023, 8'h12, p));
    rndp(); p[0] = stat_cmd(1'b1, 8'h37); p[4] = stat_cmd(1'b1, 8'h23); put(ctl(16'h0077, 8'h18, p));
    rndp(); p[0] = stat_cmd(1'b1, 8'h23); put(ctl(16'h0023, 8'h18, p));   // now passes through
    rndp(); p[0] = sram_cmd(1'b0, 1'b1, 8, 19'h7FFF0); put(ctl(16'h0077, 8'h14, p));
    rndp(); p[0] = sram_cmd(1'b1, 1'b1, 8, 19'h7FFF0); put(ctl(16'h0077, 8'h14, p));
    drain();

    // 4. grant withheld: the pipeline freezes
    fork
      begin
        rndp(); p[0] = sram_cmd(1'b1, 1'b1, 3, 19'h00050); put(ctl(16'h004F, 8'h14, p));
        rndp(); put(ctl(16'h0300, 8'h00, p));
        rndp(); p[0] = sram_cmd(1'b0, 1'b1, 2, 19'h00050); put(ctl(16'h004E, 8'h14, p));
        rndp(); p[0] = stat_cmd(1'b1, 8'h4F); p[4] = stat_cmd(1'b1, 8'hC0); put(ctl(16'h0040, 8'h18, p));
      end
      begin
        block[1] = 1'b1;
        repeat (80) @(posedge clk);
        block[1] = 1'b0;
      end
    join
    drain();

    // 5. receiver stops: output FIFO fills, then input FIFO fills
    tca_in = 1'b1;
    for (int k = 0; k < 45; k++) begin
      rndp();
      if (k % 3 == 0) begin p[0] = sram_cmd(1'b0, 1'(k % 2), 1 + k % 8, 19'(k * 16)); put(ctl(16'h0045, 8'h14, p)); end
      else if (k % 3 == 1) put(ctl(16'h0500 + 16'(k), 8'h00, p));
      else begin p[0] = stat_cmd(1'b1, 8'h85); put(ctl(16'h0045, 8'h18, p)); end
    end
    repeat (1200) @(posedge clk);
    tca_in = 1'b0;
    drain();

    // 6. random mix with random grant and backpressure
    fork
      begin
        for (int k = 0; k < 150; k++) begin
          logic [15:0] v;
          logic [7:0]  op;
          int r;
          r = $urandom_range(0, 9);
          rndp();
          v  = (r < 2) ? 16'($urandom) : 16'h0040 + 16'($urandom_range(0, 15));
          if (r == 9) v = 16'h0077;
          op = (r % 3 == 0) ? 8'h14 : (r % 3 == 1) ? 8'h18 : 8'h14;
          if (op == 8'h14) p[0] = sram_cmd(1'($urandom), 1'($urandom), $urandom_range(1, 8), 19'($urandom_range(0, 63)));
          else begin
            p[0] = stat_cmd(1'($urandom), 8'($urandom));
            p[4] = stat_cmd(1'($urandom), 8'($urandom));
          end
          put(ctl(v, op, p, ($urandom_range(0, 19) == 0) ? 8'h02 : MODID, $urandom_range(0, 19) == 0),
              ($urandom_range(0, 3) == 0) ? $urandom_range(0, 30) : 0);
        end
      end
      begin
        repeat (3000) begin
          @(posedge clk);
          if ($urandom_range(0, 29) == 0) block[$urandom_range(0, 1)] = 1'b1;
          if ($urandom_range(0, 9) == 0) begin block[0] = 1'b0; block[1] = 1'b0; end
          tca_in = ($urandom_range(0, 24) == 0) ? ~tca_in : tca_in;
        end
        block[0] = 1'b0; block[1] = 1'b0; tca_in = 1'b0;
      end
    join
    drain();

    check(n_sent == n_rcvd, $sformatf("sent %0d received %0d", n_sent, n_rcvd));
    $display("mechanisms: freeze=%0d tca_in_stall=%0d tca_out=%0d out_full=%0d b2b=%0d cut=%0d",
             n_freeze, n_tca_in, n_tca_out, n_out_full, n_b2b, n_cut);
    $display("cells: sent=%0d pass_vci=%0d pass_hec=%0d pass_mod=%0d pass_op=%0d vci_upd=%0d sram_rd=%0d sram_wr=%0d dev1=%0d stat_rd=%0d",
             n_sent, n_pass_vci, n_pass_hec, n_pass_mod, n_pass_op, n_vci_upd, n_sram_rd, n_sram_wr, n_dev1, n_stat_rd);
    check(n_freeze > 0,   "pipeline freeze never happened");
    check(n_tca_in > 0,   "tca_in backpressure never happened");
    check(n_tca_out > 0,  "input FIFO never full");
    check(n_out_full > 0, "output FIFO never full");
    check(n_b2b > 0,      "no back-to-back cells");
    check(n_cut > 0,      "no cell left by cut-through");
    check(n_pass_vci > 0 && n_pass_hec > 0 && n_pass_mod > 0 && n_pass_op > 0, "a pass-through reason never happened");
    check(n_vci_upd > 0 && n_sram_rd > 0 && n_sram_wr > 0 && n_dev1 > 0 && n_stat_rd > 0, "an operation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
