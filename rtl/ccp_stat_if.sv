// ccp_stat_if: the CCP's statistics interface. It turns the CCP FSM's event
// strobes into event numbers for the counter bank and carries counter reads
// from a statistics cell to the counter bank and back into the cell.
//
// Event numbers are eight bits: {type, low six bits of the VCI}, with type 00
// for a cell arriving on a VCI, 01 for an SRAM read and 10 for an SRAM write,
// and 1100_0000 for the total number of cells. The FSM raises at most one
// event strobe per cycle (asserted); the event is passed on in the same cycle.
// A read (rd_valid, rd_addr, rd_idx) is passed on in the same cycle; the
// counter bank answers one cycle later and the value leaves on ret as a patch
// for cell word rd_idx. The event coding follows the description; the strobe
// interface and the timing are this design's own.
module ccp_stat_if
  import ccp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // from the CCP FSM
  input  logic        ev_cell,
  input  logic        ev_total,
  input  logic        ev_sram,
  input  logic        ev_sram_rd,
  input  logic [15:0] ev_vci,
  input  logic        rd_valid,
  input  logic [7:0]  rd_addr,
  input  widx_t       rd_idx,
  output pword_t      ret,
  // to the counter bank
  output logic        cnt_inc_valid,
  output logic [7:0]  cnt_inc_addr,
  output logic        cnt_rd_valid,
  output logic [7:0]  cnt_rd_addr,
  input  logic        cnt_rd_data_valid,
  input  word_t       cnt_rd_data
);

  widx_t idx_q;

  always_comb begin
    cnt_inc_valid = ev_cell || ev_total || ev_sram;
    if (ev_total)
      cnt_inc_addr = EV_TOTAL;
    else if (ev_sram)
      cnt_inc_addr = {ev_sram_rd ? EV_READ : EV_WRITE, ev_vci[5:0]};
    else
      cnt_inc_addr = {EV_CELL, ev_vci[5:0]};
  end

  assign cnt_rd_valid = rd_valid;
  assign cnt_rd_addr  = rd_addr;

  always_ff @(posedge clk) begin
    if (rd_valid) idx_q <= rd_idx;
  end

  assign ret.valid = cnt_rd_data_valid;
  assign ret.idx   = idx_q;
  assign ret.data  = cnt_rd_data;

  a_one_event: assert property (@(posedge clk) disable iff (rst)
                                $onehot0({ev_cell, ev_total, ev_sram}));

endmodule
