// ccp_in_fifo_fsm: the input FIFO FSM. It writes each arriving cell into the
// input FIFO and keeps count of the cells there, telling the sender to stop
// when the FIFO holds 18 cells.
//
// A cell arrives as 14 consecutive words, the first one flagged by
// soc_in_int. On soc_in_int the FSM writes that word and the next 13 into the
// FIFO (fifo_we/fifo_wdata). Two counts are kept:
//   cells_held   cells with at least one word still in the FIFO; raised at
//                soc_in_int, lowered when the reader takes the cell's last
//                word (cell_done). tca_out_int is high while it is 18 or more.
//   cells_avail  cells the reader has not started yet; raised at soc_in_int,
//                lowered when the reader takes a cell's first word
//                (cell_start). cell_avail = cells_avail > 0.
// The reader may start a cell the cycle after its SOC: the FIFO is written
// one word per cycle, so the reader never overtakes the writer.
// A cell whose SOC arrives while 18 cells are held is dropped whole, so a
// sender that ignores tca_out_int cannot corrupt the FIFO.
// The 18-cell limit and the meaning of tca_out_int (high = cannot take more
// cells) follow the description; the two counts, counting a cell until its
// last word is read, and dropping are this design's own choices.
module ccp_in_fifo_fsm
  import ccp_pkg::*;
#(
  parameter int MAX_CELLS = 18
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        soc_in_int,
  input  word_t       d_in_int,
  output logic        fifo_we,
  output word_t       fifo_wdata,
  input  logic        cell_start,
  input  logic        cell_done,
  output logic        cell_avail,
  output logic        tca_out_int,
  output logic [5:0]  cells_held
);

  typedef enum logic [1:0] {IN_IDLE, IN_WRITE, IN_DROP} in_state_t;

  in_state_t  state;
  logic [3:0] wcnt;        // words of the current cell still to come
  logic [5:0] cells_avail;
  logic       accept;

  assign accept     = soc_in_int && (cells_held < 6'(MAX_CELLS));
  assign fifo_we    = accept || (state == IN_WRITE);
  assign fifo_wdata = d_in_int;
  assign cell_avail = (cells_avail != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IN_IDLE;
      wcnt        <= '0;
      cells_held  <= '0;
      cells_avail <= '0;
      tca_out_int <= 1'b0;
    end else begin
      if (soc_in_int) begin
        state <= accept ? IN_WRITE : IN_DROP;
        wcnt  <= 4'(CELL_WORDS - 1);
      end else if (state != IN_IDLE) begin
        wcnt <= wcnt - 1'b1;
        if (wcnt == 4'd1) state <= IN_IDLE;
      end
      cells_held  <= cells_held + 6'(accept) - 6'(cell_done);
      cells_avail <= cells_avail + 6'(accept) - 6'(cell_start);
      tca_out_int <= (cells_held + 6'(accept) - 6'(cell_done)) >= 6'(MAX_CELLS);
    end
  end

  a_start_has_cell: assert property (@(posedge clk) disable iff (rst) cell_start |-> cell_avail);
  a_done_has_cell:  assert property (@(posedge clk) disable iff (rst) cell_done |-> cells_held != 0);

endmodule
