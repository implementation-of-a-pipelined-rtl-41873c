// ccp_pipeline: the CCP's chain of pipeline registers, one per cell word
// (fourteen by default), through which every cell passes on its way from the
// input FIFO to the output FIFO.
//
// Each register holds a pword_t: a valid bit, the word's index inside its
// cell, and the 32-bit word. When adv is high every register takes the value
// of the one before it and register 0 takes `in`; when adv is low (the CCP's
// freeze_pipe) every register holds. On top of the move, up to NPATCH patch
// ports can replace the data of a word in flight: a patch names a word index,
// and the word with that index gets the patch data wherever it lands in this
// cycle. The CCP uses this to rewrite the opcode of a response and to drop
// SRAM read data and counter values into the payload as they come back, so
// the returned data finds its word even if the pipeline froze meanwhile. A
// patch index must match at most one word (checked by assertion); the
// traffic the CCP generates keeps equal indices fourteen registers apart.
// The register count and the freeze follow the description; the patch
// mechanism is this design's own.
module ccp_pipeline
  import ccp_pkg::*;
#(
  parameter int DEPTH  = 14,
  parameter int NPATCH = 3
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   adv,
  input  pword_t in,
  input  pword_t patch [NPATCH],
  output pword_t stage [DEPTH]
);

  pword_t nxt [DEPTH];

  always_comb begin
    for (int k = 0; k < DEPTH; k++) begin
      if (!adv)       nxt[k] = stage[k];
      else if (k == 0) nxt[k] = in;
      else            nxt[k] = stage[k-1];
      for (int p = 0; p < NPATCH; p++) begin
        if (patch[p].valid && nxt[k].valid && nxt[k].idx == patch[p].idx)
          nxt[k].data = patch[p].data;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < DEPTH; k++) begin
      stage[k].idx  <= nxt[k].idx;
      stage[k].data <= nxt[k].data;
      stage[k].valid <= rst ? 1'b0 : nxt[k].valid;
    end
  end

  // A patch must land on exactly one word.
  for (genvar p = 0; p < NPATCH; p++) begin : g_patch_chk
    logic [DEPTH-1:0] hit;
    always_comb
      for (int k = 0; k < DEPTH; k++)
        hit[k] = nxt[k].valid && nxt[k].idx == patch[p].idx;
    a_one_target: assert property (@(posedge clk) disable iff (rst)
                                   patch[p].valid |-> $onehot(hit));
  end

endmodule
