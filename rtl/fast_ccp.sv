// fast_ccp: a pipelined control cell processor. Control cells are 14-word
// ATM cells that read and write memory and read statistics; this processor
// handles them at full line rate, one cell every 14 clock cycles, with cells
// arriving and leaving back to back.
//
// Path of a cell: the input ports are registered (d_in_int, soc_in_int); the
// input FIFO FSM writes the cell into a 256x32 input FIFO; the CCP FSM reads
// it into a chain of fourteen pipeline registers and acts on it as it passes
// (VCI/HEC/Module ID/opcode checks, SRAM reads and writes, statistics reads,
// VCI register update); the output FIFO FSM writes the cell leaving the last
// register into a 256x32 output FIFO and sends it out, registered again at
// the output ports. Cells that are not for this module pass through the same
// path unchanged. A statistics counter bank counts cells and SRAM reads and
// writes per VCI and all cells.
//
// Flow control: tca_out is high while the input FIFO holds 18 cells (the
// sender must not start another cell); tca_in high stops the next cell from
// leaving. SRAM: two devices, each with request/grant (sram_out[d].req,
// sram_gr[d]), a one-cycle access strobe sram_out[d].en with we/addr/wdata,
// and read data on sram_rdata[d] SRAM_RD_LAT cycles after the strobe. When a
// device has not granted by the time the CCP needs it, the whole pipeline
// freezes until it does.
// Timing: an isolated cell leaves 27 cycles after it arrived (SOC to SOC;
// the description gives 24, see ccp_out_fifo_fsm for the difference);
// back-to-back cells leave 14 cycles apart. The description's cell format,
// opcodes, counters, 14-register pipeline, FIFO sizes and 18-cell limits are
// followed; where it is silent (field positions, SRAM command and timing,
// when a cell may leave the output FIFO) the choices are listed in the
// modules.
module fast_ccp
  import ccp_pkg::*;
#(
  parameter logic [7:0] MODULE_ID   = 8'h01,
  parameter int         SRAM_RD_LAT = 4
) (
  input  logic       clk,
  input  logic       rst,
  // cell input
  input  word_t      d_in,
  input  logic       soc_in,
  output logic       tca_out,
  // cell output
  output word_t      d_out,
  output logic       soc_out,
  input  logic       tca_in,
  // SRAM devices
  output sram_out_t  sram_out   [SRAM_DEVS],
  input  logic       sram_gr    [SRAM_DEVS],
  input  word_t      sram_rdata [SRAM_DEVS]
);

  localparam int DEPTH = CELL_WORDS;

  // ---------------- port registers ----------------
  word_t d_in_int, d_out_int;
  logic  soc_in_int, soc_out_int, tca_in_int, tca_out_int;

  always_ff @(posedge clk) begin
    if (rst) begin
      d_in_int   <= '0;
      soc_in_int <= 1'b0;
      tca_in_int <= 1'b1;
      d_out      <= '0;
      soc_out    <= 1'b0;
    end else begin
      d_in_int   <= d_in;
      soc_in_int <= soc_in;
      tca_in_int <= tca_in;
      d_out      <= d_out_int;
      soc_out    <= soc_out_int;
    end
  end

  assign tca_out = tca_out_int;

  // ---------------- input side ----------------
  logic       in_we, in_re, in_cell_avail, in_cell_start, in_cell_done;
  word_t      in_wdata, in_rdata;
  logic [5:0] in_cells_held;

  ccp_in_fifo_fsm #(.MAX_CELLS(FIFO_CELLS)) u_in_fsm (
    .clk, .rst,
    .soc_in_int, .d_in_int,
    .fifo_we    (in_we),
    .fifo_wdata (in_wdata),
    .cell_start (in_cell_start),
    .cell_done  (in_cell_done),
    .cell_avail (in_cell_avail),
    .tca_out_int,
    .cells_held (in_cells_held)
  );

  ccp_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(WORD_W)) u_in_fifo (
    .clk, .rst,
    .we (in_we), .wdata (in_wdata),
    .re (in_re), .rdata (in_rdata),
    .count (), .empty (), .full ()
  );

  // ---------------- pipeline and CCP FSM ----------------
  logic   adv, freeze_pipe, start_write_fifo_out;
  logic [3:0] quiet;
  pword_t pipe_in;
  pword_t stage [DEPTH];
  pword_t patch [3];
  logic [15:0] vci_reg;

  logic [SRAM_DEVS-1:0] sram_want, sram_granted;
  logic               acc_valid, acc_dev, acc_we;
  logic [SRAM_AW-1:0] acc_addr;
  word_t              acc_wdata;
  widx_t              acc_idx;

  logic        ev_cell, ev_total, ev_sram, ev_sram_rd;
  logic [15:0] ev_vci;
  logic        st_rd_valid;
  logic [7:0]  st_rd_addr;
  widx_t       st_rd_idx;

  logic        stat_busy;
  logic [5:0]  out_cells_held;

  ccp_fsm #(.MODULE_ID(MODULE_ID), .DEPTH(DEPTH), .MAX_CELLS(FIFO_CELLS)) u_fsm (
    .clk, .rst,
    .in_cell_avail, .in_fifo_re (in_re), .in_fifo_rdata (in_rdata),
    .in_cell_start, .in_cell_done,
    .stat_busy, .out_cells_held,
    .adv, .pipe_in, .stage, .patch_op (patch[0]),
    .sram_want, .sram_granted,
    .acc_valid, .acc_dev, .acc_we, .acc_addr, .acc_wdata, .acc_idx,
    .ev_cell, .ev_total, .ev_sram, .ev_sram_rd, .ev_vci,
    .st_rd_valid, .st_rd_addr, .st_rd_idx,
    .start_write_fifo_out, .freeze_pipe, .quiet, .vci_reg
  );

  ccp_pipeline #(.DEPTH(DEPTH), .NPATCH(3)) u_pipe (
    .clk, .rst, .adv, .in (pipe_in), .patch, .stage
  );

  // ---------------- SRAM interface ----------------
  ccp_sram_if #(.RD_LAT(SRAM_RD_LAT)) u_sram_if (
    .clk, .rst,
    .want (sram_want), .granted (sram_granted),
    .acc_valid, .acc_dev, .acc_we, .acc_addr, .acc_wdata, .acc_idx,
    .ret (patch[1]),
    .dev_out (sram_out), .dev_gr (sram_gr), .dev_rdata (sram_rdata)
  );

  // ---------------- statistics ----------------
  logic       cnt_inc_valid, cnt_rd_valid, cnt_rd_data_valid;
  logic [7:0] cnt_inc_addr, cnt_rd_addr;
  word_t      cnt_rd_data;

  ccp_stat_if u_stat_if (
    .clk, .rst,
    .ev_cell, .ev_total, .ev_sram, .ev_sram_rd, .ev_vci,
    .rd_valid (st_rd_valid), .rd_addr (st_rd_addr), .rd_idx (st_rd_idx),
    .ret (patch[2]),
    .cnt_inc_valid, .cnt_inc_addr, .cnt_rd_valid, .cnt_rd_addr,
    .cnt_rd_data_valid, .cnt_rd_data
  );

  stat_counter_plus #(.NUM(256), .CW(32)) u_stats (
    .clk, .rst,
    .busy (stat_busy),
    .inc_valid (cnt_inc_valid), .inc_addr (cnt_inc_addr),
    .rd_valid (cnt_rd_valid), .rd_addr (cnt_rd_addr),
    .rd_data_valid (cnt_rd_data_valid), .rd_data (cnt_rd_data)
  );

  // ---------------- output side ----------------
  logic  out_we, out_re;
  word_t out_wdata, out_rdata;

  ccp_out_fifo_fsm u_out_fsm (
    .clk, .rst,
    .start_write_fifo_out, .freeze_pipe, .quiet,
    .pipe_word  (stage[DEPTH-1].data),
    .fifo_we    (out_we), .fifo_wdata (out_wdata),
    .fifo_re    (out_re), .fifo_rdata (out_rdata),
    .tca_in_int,
    .d_out_int, .soc_out_int,
    .cells_held (out_cells_held)
  );

  ccp_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(WORD_W)) u_out_fifo (
    .clk, .rst,
    .we (out_we), .wdata (out_wdata),
    .re (out_re), .rdata (out_rdata),
    .count (), .empty (), .full ()
  );

endmodule
