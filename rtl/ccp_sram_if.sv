// ccp_sram_if: the CCP's SRAM interface. It connects the CCP FSM to two SRAM
// devices, each reached through a request/grant handshake, and brings read
// data back to the payload word it belongs to.
//
// Request: the FSM raises want[d] while it needs device d; dev_out[d].req
// follows it. The grant comes back on dev_gr[d] and is passed to the FSM as
// granted[d]. An access (acc_valid) is only issued to a device that grants it
// in the same cycle (asserted). Each access drives en, we, addr and wdata of
// the selected device for that one cycle.
// Read return: a device delivers read data RD_LAT cycles after the access.
// The interface remembers, per access, the device and the index of the cell
// word that asked; when the data arrives it is offered to the pipeline as a
// patch (ret) for that word index. Write accesses return nothing.
// The two devices, device select, request/grant and holding the address while
// waiting for grant follow the description; the fixed read latency (RD_LAT,
// default 4) and the port names are this design's own.
module ccp_sram_if
  import ccp_pkg::*;
#(
  parameter int RD_LAT = 4
) (
  input  logic               clk,
  input  logic               rst,
  // from the CCP FSM
  input  logic [SRAM_DEVS-1:0] want,
  output logic [SRAM_DEVS-1:0] granted,
  input  logic               acc_valid,
  input  logic               acc_dev,
  input  logic               acc_we,
  input  logic [SRAM_AW-1:0] acc_addr,
  input  word_t              acc_wdata,
  input  widx_t              acc_idx,
  output pword_t             ret,
  // to the SRAM devices
  output sram_out_t          dev_out   [SRAM_DEVS],
  input  logic               dev_gr    [SRAM_DEVS],
  input  word_t              dev_rdata [SRAM_DEVS]
);

  typedef struct packed {
    logic  valid;
    logic  dev;
    widx_t idx;
  } rd_tag_t;

  rd_tag_t tag [RD_LAT];

  always_comb begin
    for (int d = 0; d < SRAM_DEVS; d++) begin
      granted[d]        = dev_gr[d];
      dev_out[d].req    = want[d];
      dev_out[d].en     = acc_valid && (acc_dev == 1'(d));
      dev_out[d].we     = acc_we;
      dev_out[d].addr   = acc_addr;
      dev_out[d].wdata  = acc_wdata;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < RD_LAT; i++) begin
      if (rst)
        tag[i] <= '0;
      else if (i == 0)
        tag[i] <= '{valid: acc_valid && !acc_we, dev: acc_dev, idx: acc_idx};
      else
        tag[i] <= tag[i-1];
    end
  end

  assign ret.valid = tag[RD_LAT-1].valid;
  assign ret.idx   = tag[RD_LAT-1].idx;
  assign ret.data  = dev_rdata[tag[RD_LAT-1].dev];

  a_access_granted: assert property (@(posedge clk) disable iff (rst)
                                     acc_valid |-> dev_gr[acc_dev] && want[acc_dev]);
  initial assert (RD_LAT >= 1 && RD_LAT <= CELL_WORDS - 2)
    else $error("RD_LAT must let read data return before its word leaves the pipeline");

endmodule
