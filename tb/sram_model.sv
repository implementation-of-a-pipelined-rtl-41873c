// sram_model: behavioural stand-in for one SRAM device with its memory
// controller and arbiter, for testbenches only.
// Grant: gr follows req one cycle later, unless `block` is high (a
// contending module owns the device), in which case it is withheld.
// Access: on en, a write stores wdata; a read returns the word on rdata
// RD_LAT cycles later. Never-written words read as tb_ccp_pkg::sram_init.
module sram_model
  import ccp_pkg::*;
#(
  parameter int DEV    = 0,
  parameter int RD_LAT = 4
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      block,
  input  sram_out_t bus,
  output logic      gr,
  output word_t     rdata
);

  word_t mem [logic [SRAM_AW-1:0]];
  word_t pipe [RD_LAT];
  int    n_acc;

  always @(posedge clk) begin
    if (rst) begin
      gr    <= 1'b0;
      n_acc <= 0;
    end else begin
      gr <= bus.req && !block;
      if (bus.en) begin
        n_acc <= n_acc + 1;
        if (!gr) $error("sram_model %0d: access without grant", DEV);
        if (bus.we) mem[bus.addr] = bus.wdata;
      end
    end
    for (int i = RD_LAT-1; i > 0; i--) pipe[i] <= pipe[i-1];
    if (bus.en && !bus.we)
      pipe[0] <= mem.exists(bus.addr) ? mem[bus.addr] : tb_ccp_pkg::sram_init(DEV, bus.addr);
    else
      pipe[0] <= 32'hDEAD_BEEF;
  end

  assign rdata = pipe[RD_LAT-1];

endmodule
