// ccp_fifo: synchronous first-in first-out buffer, 256 words of 32 bits by
// default; the CCP uses one on its input and one on its output.
//
// The storage is a plain array with one write port and one registered read
// port, so it maps onto on-chip block RAM. A write stores wdata at the tail in
// the cycle we is high. A read (re high) removes the head word and presents it
// on rdata from the next cycle on; rdata keeps its value while re is low, which
// lets the reader treat rdata as a holding register. A word written in cycle t
// can be read from cycle t+1. `count` is the number of words held. Writing
// while full or reading while empty is a protocol error and is asserted
// against; the FIFO then leaves its state unchanged for that port.
// Depth and width follow the description (two 256 by 32 FIFOs); the port
// style is this design's own.
module ccp_fifo #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  output logic [WIDTH-1:0]         rdata,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     empty,
  output logic                     full
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = we && !full;
  assign do_rd = re && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
    if (do_rd) rdata <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(we && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(re && empty));

endmodule
