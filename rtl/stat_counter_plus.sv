// stat_counter_plus: a bank of event counters (256 counters of 32 bits by
// default). Each cycle it can count one event, named by its event number,
// and answer one counter read.
//
// The counters live in one memory array. An increment is a two-cycle
// read-modify-write: in the cycle inc_valid is high the counter is read into
// a holding register, in the next cycle the incremented value is written
// back. Back-to-back increments of the same counter and a read of a counter
// whose increment is still in flight are forwarded from the write-back stage,
// so no event is lost and every read sees all events counted before it.
// Reads: rd_valid/rd_addr in cycle t, rd_data/rd_data_valid in cycle t+1.
// Counters wrap at 2^32.
// After reset the module spends one cycle per counter writing zeros; busy is
// high meanwhile and events and reads are not accepted.
// The counter set (cells, SRAM reads and SRAM writes per VCI, and a total)
// follows the description; the memory organisation, the clearing sweep and
// the timing are this design's own.
module stat_counter_plus #(
  parameter int NUM = 256,
  parameter int CW  = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  output logic                   busy,
  input  logic                   inc_valid,
  input  logic [$clog2(NUM)-1:0] inc_addr,
  input  logic                   rd_valid,
  input  logic [$clog2(NUM)-1:0] rd_addr,
  output logic                   rd_data_valid,
  output logic [CW-1:0]          rd_data
);

  localparam int AW = $clog2(NUM);

  logic [CW-1:0] mem [NUM];

  logic          clr_active;
  logic [AW-1:0] clr_addr;

  // Write-back stage of the read-modify-write.
  logic          wb_valid;
  logic [AW-1:0] wb_addr;
  logic [CW-1:0] wb_old;
  logic [CW-1:0] wb_new;

  assign busy   = clr_active;
  assign wb_new = wb_old + 1'b1;

  always_ff @(posedge clk) begin
    if (clr_active)
      mem[clr_addr] <= '0;
    else if (wb_valid)
      mem[wb_addr] <= wb_new;
    wb_old  <= (wb_valid && wb_addr == inc_addr) ? wb_new : mem[inc_addr];
    wb_addr <= inc_addr;
    rd_data <= (wb_valid && wb_addr == rd_addr) ? wb_new : mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      clr_active    <= 1'b1;
      clr_addr      <= '0;
      wb_valid      <= 1'b0;
      rd_data_valid <= 1'b0;
    end else begin
      if (clr_active) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == AW'(NUM - 1)) clr_active <= 1'b0;
      end
      wb_valid      <= inc_valid && !clr_active;
      rd_data_valid <= rd_valid && !clr_active;
    end
  end

  a_no_inc_when_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !inc_valid);
  a_no_rd_when_busy:  assert property (@(posedge clk) disable iff (rst) busy |-> !rd_valid);

endmodule
