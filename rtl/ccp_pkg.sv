// ccp_pkg: types, field positions and constants shared by the fast control
// cell processor (CCP).
//
// A cell is fourteen 32-bit words (word 0 = ATM header, word 1 = HEC byte,
// words 2..13 = 48-byte payload). The CCP acts on control cells:
//   word 0  GFC[31:28] VPI[27:20] VCI[19:4] PTI[3:1] CLP[0]   (standard UNI header)
//   word 1  HEC[31:24], rest unused
//   word 2  Module ID[31:24]  Opcode[23:16]  sequence number[15:0]
//   word 3  payload 1 ... word 12 payload 10, word 13 trailer (passed unchanged)
// The three opcodes (x12 set VCI, x14 SRAM access, x18 statistics read), the
// reset VCI x0023, the fixed VCIs x0040..x004F, the event-number coding and the
// statistics address field [16:9] with its read flag in bit 31 follow the
// design description. The placement of the Module ID, opcode and SRAM command
// fields, the response opcode (request opcode + 1) and the SRAM command layout
// are this design's own choices.
package ccp_pkg;

  localparam int CELL_WORDS = 14;
  localparam int WORD_W     = 32;
  localparam int FIFO_DEPTH = 256;   // words in each of the two FIFOs
  localparam int FIFO_CELLS = 18;    // whole cells a 256-word FIFO holds

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [3:0]        widx_t;   // word index inside a cell, 0..13

  // One pipeline register: the word, its index inside its cell, and whether
  // the register holds a word at all (bubbles travel as valid = 0).
  typedef struct packed {
    logic  valid;
    widx_t idx;
    word_t data;
  } pword_t;

  // Word positions inside a cell.
  localparam widx_t W_HDR = 4'd0;
  localparam widx_t W_HEC = 4'd1;
  localparam widx_t W_CMD = 4'd2;
  localparam widx_t W_P1  = 4'd3;   // payload 1
  localparam widx_t W_P2  = 4'd4;   // payload 2
  localparam widx_t W_P5  = 4'd7;   // payload 5
  localparam widx_t W_P6  = 4'd8;   // payload 6
  localparam widx_t W_LAST = 4'(CELL_WORDS - 1);

  // Opcodes.
  localparam logic [7:0] OP_SET_VCI = 8'h12;
  localparam logic [7:0] OP_SRAM    = 8'h14;
  localparam logic [7:0] OP_STAT    = 8'h18;

  typedef enum logic [1:0] {
    CELL_PASS = 2'd0,   // not for this module, or failed a check
    CELL_VCI  = 2'd1,
    CELL_SRAM = 2'd2,
    CELL_STAT = 2'd3
  } cell_kind_t;

  localparam logic [15:0] VCI_RESET = 16'h0023;
  localparam logic [15:0] VCI_BLOCK = 16'h0040;   // x0040..x004F

  // Statistics event numbers: {type, VCI[5:0]}, and the total-cells counter.
  typedef enum logic [1:0] {
    EV_CELL  = 2'b00,
    EV_READ  = 2'b01,
    EV_WRITE = 2'b10
  } ev_type_t;
  localparam logic [7:0] EV_TOTAL = 8'b1100_0000;

  // SRAM command word (payload 1 of an x14 cell).
  //   [31]    1 = read, 0 = write
  //   [30]    device select (0 or 1)
  //   [29:27] burst length - 1 (1..8 words, carried in payloads 2..9)
  //   [18:0]  first word address
  localparam int SRAM_AW   = 19;
  localparam int SRAM_DEVS = 2;
  localparam int MAX_BURST = 8;

  // Request bundle from the CCP to one SRAM device.
  typedef struct packed {
    logic               req;    // request/hold the device
    logic               en;     // access this cycle
    logic               we;     // 1 = write
    logic [SRAM_AW-1:0] addr;
    word_t              wdata;
  } sram_out_t;

  // Header helpers.
  function automatic logic [15:0] hdr_vci(input word_t w);
    return w[19:4];
  endfunction

  function automatic logic [7:0] cmd_module(input word_t w);
    return w[31:24];
  endfunction

  function automatic logic [7:0] cmd_opcode(input word_t w);
    return w[23:16];
  endfunction

  // ATM header error control: CRC-8 with generator x^8 + x^2 + x + 1 over the
  // four header bytes, most significant bit first, then XOR with 0x55
  // (ITU-T I.432).
  function automatic logic [7:0] atm_hec(input word_t hdr);
    logic [7:0] crc;
    logic       fb;
    crc = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      fb  = crc[7] ^ hdr[i];
      crc = {crc[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return crc ^ 8'h55;
  endfunction

endpackage
