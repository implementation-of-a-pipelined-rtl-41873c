// ccp_fsm: the CCP finite state machine. It feeds cells from the input FIFO
// into the fourteen-word pipeline, recognises the control cells meant for
// this module, and carries out their opcodes as the words pass the first
// pipeline register.
//
// Reading: when the input FIFO holds an unstarted cell, the statistics
// counters are ready and the output side has room (cells in the output FIFO
// plus cells already admitted below 18), the FSM reads the cell's 14 words on
// consecutive cycles. A word read in cycle t is in FIFO rdata in t+1 and moves
// into pipeline register 0 at the next advance, carrying its word index.
// A new cell can be started in the cycle after the previous cell's last word,
// so cells flow back to back.
//
// Checks, when word 2 is in register 0 (so words 1 and 0 are in registers 1
// and 2): the VCI is x0040..x004F or the programmable VCI, the HEC matches the
// header, the Module ID equals MODULE_ID and the opcode is x12, x14 or x18.
// A cell failing any check passes through unchanged. A cell passing them has
// its opcode replaced by the response opcode (request + 1) and then:
//   x12  payload 1 [31:16] is loaded into the programmable VCI register
//        (x0023 after reset);
//   x14  payload 1 is an SRAM command (read/write, device, burst length,
//        address, see ccp_pkg). The device is requested while payload 1 is in
//        register 0. Each data word (payloads 2..) makes one access when it
//        reaches register 0: a write sends the word, a read later replaces it
//        with the returned data. If the device has not granted, freeze_pipe
//        is raised and the whole pipeline, this FSM, the FIFO reader and the
//        output writer hold until it does.
//   x18  if bit 31 of payload 1 (payload 5) is set, the counter named by its
//        bits [16:9] is read and its value replaces payload 2 (payload 6).
// Events: a cell on one of the 17 VCIs counts on {00, VCI[5:0]}; every cell
// counts on the total counter; an SRAM cell counts one read or one write on
// {01 or 10, VCI[5:0]}.
// start_write_fifo_out is raised in the cycle word 0 of a cell leaves the
// last pipeline register. quiet tells the output FIFO FSM for how many
// cycles, this one included, freeze_pipe is certain to stay low; it lets a
// cell start leaving before all its words are written.
// The opcodes, the checks, the freeze, the 18-cell limit and the event
// numbers follow the description. Field positions, the response opcode, the
// choice to count per-VCI cells only on the module's own VCIs and to count one
// SRAM event per cell, the quiet look-ahead and all cycle timing are this
// design's own.
module ccp_fsm
  import ccp_pkg::*;
#(
  parameter logic [7:0] MODULE_ID = 8'h01,
  parameter int         DEPTH     = 14,
  parameter int         MAX_CELLS = 18
) (
  input  logic        clk,
  input  logic        rst,
  // input FIFO
  input  logic        in_cell_avail,
  output logic        in_fifo_re,
  input  word_t       in_fifo_rdata,
  output logic        in_cell_start,
  output logic        in_cell_done,
  // admission
  input  logic        stat_busy,
  input  logic [5:0]  out_cells_held,
  // pipeline
  output logic        adv,
  output pword_t      pipe_in,
  input  pword_t      stage [DEPTH],
  output pword_t      patch_op,
  // SRAM interface
  output logic [SRAM_DEVS-1:0] sram_want,
  input  logic [SRAM_DEVS-1:0] sram_granted,
  output logic        acc_valid,
  output logic        acc_dev,
  output logic        acc_we,
  output logic [SRAM_AW-1:0] acc_addr,
  output word_t       acc_wdata,
  output widx_t       acc_idx,
  // statistics interface
  output logic        ev_cell,
  output logic        ev_total,
  output logic        ev_sram,
  output logic        ev_sram_rd,
  output logic [15:0] ev_vci,
  output logic        st_rd_valid,
  output logic [7:0]  st_rd_addr,
  output widx_t       st_rd_idx,
  // output side
  output logic        start_write_fifo_out,
  output logic        freeze_pipe,
  output logic [3:0]  quiet,
  output logic [15:0] vci_reg
);

  typedef enum logic {RD_IDLE, RD_CELL} rd_state_t;

  pword_t s0;
  assign s0 = stage[0];

  // ---------------- FIFO reader ----------------
  rd_state_t  rd_state;
  widx_t      rd_idx;
  logic       rd_pend_valid;
  widx_t      rd_pend_idx;
  logic [5:0] inflight;       // admitted cells not yet writing to the output FIFO
  logic       start_ok;
  logic       do_read;
  widx_t      read_idx;

  assign start_ok = in_cell_avail && !stat_busy &&
                    ({1'b0, out_cells_held} + {1'b0, inflight} < 7'(MAX_CELLS));

  always_comb begin
    if (rd_state == RD_CELL) begin
      do_read  = adv;
      read_idx = rd_idx;
    end else begin
      do_read  = adv && start_ok;
      read_idx = W_HDR;
    end
  end

  assign in_fifo_re    = do_read;
  assign in_cell_start = do_read && read_idx == W_HDR;
  assign in_cell_done  = do_read && read_idx == W_LAST;
  assign pipe_in       = '{valid: rd_pend_valid, idx: rd_pend_idx, data: in_fifo_rdata};

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_state      <= RD_IDLE;
      rd_idx        <= '0;
      rd_pend_valid <= 1'b0;
      rd_pend_idx   <= '0;
    end else if (adv) begin
      rd_pend_valid <= do_read;
      rd_pend_idx   <= read_idx;
      if (do_read) begin
        rd_state <= (read_idx == W_LAST) ? RD_IDLE : RD_CELL;
        rd_idx   <= (read_idx == W_LAST) ? W_HDR : read_idx + 1'b1;
      end
    end
  end

  // ---------------- cell checks (word 2 in register 0) ----------------
  word_t      hdr;
  logic [15:0] hdr_vci_w;
  logic       vci_hit, hec_ok, mod_ok;
  logic [7:0] opcode;
  cell_kind_t kind_now, kind;

  function automatic logic vci_is_ours(input logic [15:0] v, input logic [15:0] prog);
    return (v == prog) || (v[15:4] == VCI_BLOCK[15:4]);
  endfunction

  assign hdr       = stage[2].data;
  assign hdr_vci_w = hdr_vci(hdr);
  assign vci_hit   = vci_is_ours(hdr_vci_w, vci_reg);
  assign hec_ok    = stage[1].data[31:24] == atm_hec(hdr);
  assign mod_ok    = cmd_module(s0.data) == MODULE_ID;
  assign opcode    = cmd_opcode(s0.data);

  always_comb begin
    kind_now = CELL_PASS;
    if (vci_hit && hec_ok && mod_ok) begin
      unique case (opcode)
        OP_SET_VCI: kind_now = CELL_VCI;
        OP_SRAM:    kind_now = CELL_SRAM;
        OP_STAT:    kind_now = CELL_STAT;
        default:    kind_now = CELL_PASS;
      endcase
    end
  end

  logic at_cmd;
  assign at_cmd = s0.valid && s0.idx == W_CMD;

  // Response opcode written as word 2 moves on.
  assign patch_op.valid = at_cmd && adv && kind_now != CELL_PASS;
  assign patch_op.idx   = W_CMD;
  assign patch_op.data  = {s0.data[31:24], opcode + 8'd1, s0.data[15:0]};

  // ---------------- SRAM operation ----------------
  logic               s_active;
  logic               s_rd;
  logic               s_dev;
  logic [3:0]         s_last;      // index of the last data word
  logic [SRAM_AW-1:0] s_addr;
  logic               at_p1;
  logic               sram_cmd_now;
  logic               need;
  logic [15:0]        cell_vci;    // VCI of the cell in register 0

  assign at_p1        = s0.valid && s0.idx == W_P1;
  assign sram_cmd_now = at_p1 && kind == CELL_SRAM;
  assign need         = s_active && s0.valid && s0.idx >= W_P2 && s0.idx <= s_last;

  assign freeze_pipe = need && !sram_granted[s_dev];
  assign adv         = !freeze_pipe;

  always_comb begin
    sram_want = '0;
    if (s_active) sram_want[s_dev] = 1'b1;
    if (sram_cmd_now) sram_want[s0.data[30]] = 1'b1;
  end

  assign acc_valid = need && sram_granted[s_dev];
  assign acc_dev   = s_dev;
  assign acc_we    = !s_rd;
  assign acc_addr  = s_addr + SRAM_AW'(s0.idx - W_P2);
  assign acc_wdata = s0.data;
  assign acc_idx   = s0.idx;

  // ---------------- statistics ----------------
  assign ev_cell    = adv && s0.valid && s0.idx == W_HDR &&
                      vci_is_ours(hdr_vci(s0.data), vci_reg);
  assign ev_total   = adv && s0.valid && s0.idx == W_HEC;
  assign ev_sram    = adv && sram_cmd_now;
  assign ev_sram_rd = s0.data[31];
  assign ev_vci     = (s0.idx == W_HDR) ? hdr_vci(s0.data) : cell_vci;

  assign st_rd_valid = adv && s0.valid && kind == CELL_STAT &&
                       (s0.idx == W_P1 || s0.idx == W_P5) && s0.data[31];
  assign st_rd_addr  = s0.data[16:9];
  assign st_rd_idx   = s0.idx + 1'b1;

  // ---------------- output side ----------------
  assign start_write_fifo_out = adv && stage[DEPTH-1].valid && stage[DEPTH-1].idx == W_HDR;

  // Freeze look-ahead: quiet = number of cycles, starting with this one, in
  // which freeze_pipe is certain to stay low (saturating at 15). A freeze
  // needs an SRAM data word (payload 2 or later) of an SRAM cell in
  // register 0. Cells are contiguous in the pipeline, so the nearest such
  // word is word 4 of the cell in register 0 (if its kind is not yet known),
  // or word 4 of the next cell to enter register 0.
  always_comb begin
    if (s_active || sram_cmd_now)
      quiet = 4'd0;
    else if (s0.valid && s0.idx <= W_CMD)
      quiet = 4'(W_P2 - s0.idx);                    // this cell could be SRAM
    else if (rd_pend_valid && rd_pend_idx < W_P2)
      quiet = 4'(5 - int'(rd_pend_idx));            // a cell starts entering
    else if (rd_pend_valid)                         // next cell follows this one
      quiet = (rd_pend_idx == W_P2) ? 4'd15 : 4'(19 - int'(rd_pend_idx));
    else if (!in_cell_avail)
      quiet = 4'd7;                                 // no cell to read yet
    else
      quiet = 4'd6;                                 // a read may start now
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      kind     <= CELL_PASS;
      cell_vci <= '0;
      vci_reg  <= VCI_RESET;
      s_active <= 1'b0;
      s_rd     <= 1'b0;
      s_dev    <= 1'b0;
      s_last   <= '0;
      s_addr   <= '0;
      inflight <= '0;
    end else begin
      inflight <= inflight + 6'(in_cell_start) - 6'(start_write_fifo_out);
      if (adv && s0.valid) begin
        if (s0.idx == W_HDR) cell_vci <= hdr_vci(s0.data);
        if (s0.idx == W_CMD) kind <= kind_now;
        if (at_p1 && kind == CELL_VCI) vci_reg <= s0.data[31:16];
        if (sram_cmd_now) begin
          s_active <= 1'b1;
          s_rd     <= s0.data[31];
          s_dev    <= s0.data[30];
          s_last   <= W_P2 + {1'b0, s0.data[29:27]};
          s_addr   <= s0.data[SRAM_AW-1:0];
        end
        if (need && s0.idx == s_last) s_active <= 1'b0;
      end
    end
  end

  a_cmd_follows_hdr: assert property (@(posedge clk) disable iff (rst)
      at_cmd |-> stage[1].valid && stage[1].idx == W_HEC && stage[2].valid && stage[2].idx == W_HDR);
  a_inflight_ok: assert property (@(posedge clk) disable iff (rst)
      !(start_write_fifo_out && inflight == 0));

endmodule
