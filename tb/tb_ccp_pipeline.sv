// tb_ccp_pipeline: checks the fourteen pipeline registers: a word written in
// reaches register k after k+1 advances and nowhere else, nothing moves while
// adv is low, bubbles travel as invalid registers, and a patch replaces the
// data of the one word carrying its index, whether the pipeline moves or
// holds in that cycle.
module tb_ccp_pipeline;
  import ccp_pkg::*;
  localparam int D = 14;

  logic   clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic   adv = 1'b0;
  pword_t in;
  pword_t patch [3];
  pword_t stage [D];

  ccp_pipeline dut (.clk, .rst, .adv, .in, .patch, .stage);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Model: position of each register's word, as plain arrays.
  logic  mv [D];
  widx_t mi [D];
  word_t md [D];
  int    seq = 0;
  int    n_patch = 0, n_patch_frozen = 0, n_hold = 0;

  initial begin
    in = '0;
    foreach (patch[p]) patch[p] = '0;
    foreach (mv[k]) mv[k] = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic  nv [D];
      widx_t ni [D];
      word_t nd [D];
      adv = ($urandom_range(0, 3) != 0);
      in.valid = ($urandom_range(0, 4) != 0);
      in.idx   = widx_t'(seq % 14);
      in.data  = $urandom;
      // Next contents before patches.
      for (int k = 0; k < D; k++) begin
        if (!adv) begin nv[k] = mv[k]; ni[k] = mi[k]; nd[k] = md[k]; end
        else if (k == 0) begin nv[k] = in.valid; ni[k] = in.idx; nd[k] = in.data; end
        else begin nv[k] = mv[k-1]; ni[k] = mi[k-1]; nd[k] = md[k-1]; end
      end
      // Patch a random word that will be in the pipeline.
      foreach (patch[p]) patch[p] = '0;
      if ($urandom_range(0, 1) == 1) begin
        int k = $urandom_range(0, D-1);
        if (nv[k]) begin
          int p = $urandom_range(0, 2);
          patch[p] = '{valid: 1'b1, idx: ni[k], data: $urandom};
          nd[k] = patch[p].data;
          n_patch++;
          if (!adv) n_patch_frozen++;
        end
      end
      if (!adv) n_hold++;
      @(posedge clk);
      #1;
      if (adv && in.valid) seq++;
      for (int k = 0; k < D; k++) begin
        mv[k] = nv[k]; mi[k] = ni[k]; md[k] = nd[k];
        check(stage[k].valid == mv[k], $sformatf("cycle %0d reg %0d valid", cyc, k));
        if (mv[k])
          check(stage[k].idx == mi[k] && stage[k].data == md[k],
                $sformatf("cycle %0d reg %0d: %0d/%08x exp %0d/%08x", cyc, k,
                          stage[k].idx, stage[k].data, mi[k], md[k]));
      end
      foreach (patch[p]) patch[p] = '0;
    end
    check(n_patch > 100 && n_patch_frozen > 10 && n_hold > 100, "coverage");
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
