// tb_ccp_sram_if: checks the SRAM interface: requests follow want, grants are
// passed back, an access strobes only the selected device with its address,
// data and direction, and the data a device returns four cycles after a read
// comes back tagged with the word index of that read; writes return nothing.
module tb_ccp_sram_if;
  import ccp_pkg::*;
  localparam int LAT = 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [1:0]         want = '0, granted;
  logic               acc_valid = 1'b0, acc_dev = 1'b0, acc_we = 1'b0;
  logic [SRAM_AW-1:0] acc_addr = '0;
  word_t              acc_wdata = '0;
  widx_t              acc_idx = '0;
  pword_t             ret;
  sram_out_t          dev_out [2];
  logic               dev_gr [2];
  word_t              dev_rdata [2];

  ccp_sram_if dut (.clk, .rst, .want, .granted, .acc_valid, .acc_dev, .acc_we, .acc_addr,
                   .acc_wdata, .acc_idx, .ret, .dev_out, .dev_gr, .dev_rdata);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Accesses by cycle: read?, word index, device.
  int    n_rd = 0, n_wr = 0;

  initial begin
    dev_gr[0] = 1'b0; dev_gr[1] = 1'b0;
    dev_rdata[0] = '0; dev_rdata[1] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      want      = 2'($urandom);
      dev_gr[0] = want[0] && $urandom_range(0, 3) != 0;
      dev_gr[1] = want[1] && $urandom_range(0, 3) != 0;
      acc_dev   = 1'($urandom);
      acc_valid = dev_gr[acc_dev] && $urandom_range(0, 1);
      acc_we    = 1'($urandom);
      acc_addr  = 19'($urandom);
      acc_wdata = $urandom;
      acc_idx   = 4'($urandom_range(4, 11));
      dev_rdata[0] = $urandom;
      dev_rdata[1] = $urandom;
      #1;
      // combinational side
      for (int d = 0; d < 2; d++) begin
        check(dev_out[d].req == want[d] && granted[d] == dev_gr[d], "req/grant");
        check(dev_out[d].en == (acc_valid && acc_dev == 1'(d)), "strobe to selected device");
        if (dev_out[d].en)
          check(dev_out[d].addr == acc_addr && dev_out[d].wdata == acc_wdata && dev_out[d].we == acc_we,
                "access fields");
      end
      // ret shows the read issued LAT cycles ago
      hv[cyc] = acc_valid && !acc_we; hi[cyc] = acc_idx; hd[cyc] = acc_dev;
      if (acc_valid) begin if (acc_we) n_wr++; else n_rd++; end
      if (cyc >= LAT) begin
        check(ret.valid == hv[cyc-LAT], "ret valid");
        if (hv[cyc-LAT]) check(ret.idx == hi[cyc-LAT] && ret.data == dev_rdata[hd[cyc-LAT]], "ret tag and data");
      end
      @(posedge clk);
      #1;
    end
    check(n_rd > 100 && n_wr > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic  hv [3000];
  widx_t hi [3000];
  logic  hd [3000];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
