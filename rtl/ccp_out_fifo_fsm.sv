// ccp_out_fifo_fsm: the output FIFO FSM. It writes the cells leaving the
// pipeline into the output FIFO and sends them out of the module, whole and
// back to back, while the receiver accepts cells.
//
// Write side: start_write_fifo_out comes from the CCP FSM in the cycle word 0
// of a cell leaves the last pipeline register (pipe_word). That word and the
// following 13 are written into the FIFO, one per cycle, except in cycles
// where freeze_pipe holds the pipeline.
// Send side: a cell may start leaving when tca_in_int is low (high means the
// receiver cannot take another cell; it is looked at only between cells)
// and either all 14 of its words are in the FIFO, or it is the cell being
// written, nothing is queued ahead of it, and the words still to be written
// (14 - wcnt) fit into the freeze-free window the CCP FSM announces on
// quiet. In the second case (cut-through) every word is in the FIFO at least
// one cycle before it is read, because no freeze can stop the writer until
// the cell is complete. The words then leave on consecutive cycles, word 0
// flagged by soc_out_int; the next cell can follow directly, giving 14
// cycles from SOC to SOC. d_out_int is zero between cells.
// Timing: fifo_re in cycle t, the word on d_out_int in cycle t+1.
// Counts: cells_held (raised at start_write_fifo_out, lowered when a cell
// begins to leave) is what the CCP FSM compares with 18 before it lets a new
// cell into the pipeline; cells_ready counts fully written cells that have
// not started leaving; early marks a cell that left by cut-through.
// Writing while freeze_pipe is low, the tca_in_int check and the 18-cell count
// follow the description. The rule for when a cell may start leaving is this
// design's own: a freeze can stop the writer for any number of cycles, and a
// cell already leaving must not run dry, so a cell leaves before it is
// complete only when no freeze can come before its last word is written.
module ccp_out_fifo_fsm
  import ccp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start_write_fifo_out,
  input  logic        freeze_pipe,
  input  logic [3:0]  quiet,
  input  word_t       pipe_word,
  output logic        fifo_we,
  output word_t       fifo_wdata,
  output logic        fifo_re,
  input  word_t       fifo_rdata,
  input  logic        tca_in_int,
  output word_t       d_out_int,
  output logic        soc_out_int,
  output logic [5:0]  cells_held
);

  logic       wactive;
  logic [3:0] wcnt;          // index of the next word to write
  logic       wlast;
  logic [5:0] cells_ready;

  logic       sactive;
  logic [3:0] scnt;          // index of the next word to read
  logic       send_full;     // start sending a completely written cell
  logic       send_cut;      // start sending the cell still being written
  logic       early;         // the cell being written has already started leaving
  logic       send_start;
  logic       dv_q, soc_q;

  // Write side.
  assign fifo_we    = start_write_fifo_out || (wactive && !freeze_pipe);
  assign fifo_wdata = pipe_word;
  assign wlast      = wactive && !freeze_pipe && wcnt == W_LAST;

  // Send side.
  assign send_full  = (cells_ready != 0) && !tca_in_int && !sactive;
  assign send_cut   = (cells_ready == 0) && !tca_in_int && !sactive && wactive && !early &&
                      (5'd14 - {1'b0, wcnt} <= {1'b0, quiet});
  assign send_start = send_full || send_cut;
  assign fifo_re    = sactive || send_start;

  assign d_out_int   = dv_q ? fifo_rdata : '0;
  assign soc_out_int = soc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      wactive     <= 1'b0;
      wcnt        <= '0;
      sactive     <= 1'b0;
      scnt        <= '0;
      cells_held  <= '0;
      cells_ready <= '0;
      early       <= 1'b0;
      dv_q        <= 1'b0;
      soc_q       <= 1'b0;
    end else begin
      if (start_write_fifo_out) begin
        wactive <= 1'b1;
        wcnt    <= 4'd1;
      end else if (wactive && !freeze_pipe) begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == W_LAST) wactive <= 1'b0;
      end

      if (send_start) begin
        sactive <= 1'b1;
        scnt    <= 4'd1;
      end else if (sactive) begin   // word scnt is read this cycle
        scnt <= scnt + 1'b1;
        if (scnt == W_LAST) sactive <= 1'b0;
      end

      dv_q  <= fifo_re;
      soc_q <= send_start;

      cells_held  <= cells_held  + 6'(start_write_fifo_out) - 6'(send_start);
      cells_ready <= cells_ready + 6'(wlast && !early && !send_cut) - 6'(send_full);
      if (wlast)         early <= 1'b0;
      else if (send_cut) early <= 1'b1;
    end
  end

  a_start_when_idle: assert property (@(posedge clk) disable iff (rst)
                                      start_write_fifo_out |-> !wactive || wlast);
  a_start_not_frozen: assert property (@(posedge clk) disable iff (rst)
                                       start_write_fifo_out |-> !freeze_pipe);

endmodule
