// tb_ccp_pkg: helpers shared by the CCP testbenches. Builds control cells
// field by field and computes the ATM HEC independently of the design (byte
// by byte, CRC-8 x^8+x^2+x+1, then XOR 0x55).
package tb_ccp_pkg;

  typedef logic [31:0] word_t;
  typedef logic [13:0][31:0] cell_t;   // cell_t[i] is word i

  function automatic logic [7:0] ref_hec(input word_t hdr);
    logic [7:0] c;
    c = 8'h00;
    for (int b = 3; b >= 0; b--) begin
      c = c ^ hdr[b*8 +: 8];
      for (int k = 0; k < 8; k++)
        c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    end
    return c ^ 8'h55;
  endfunction

  // Header word with VPI 0 and the given VCI.
  function automatic word_t mk_hdr(input logic [15:0] vci);
    return {4'h0, 8'h00, vci, 3'b000, 1'b0};
  endfunction

  // Control cell: header, HEC (optionally corrupted), command word, payloads
  // 1..10 and a trailer word.
  function automatic cell_t mk_cell(input logic [15:0] vci, input logic [7:0] modid,
                                    input logic [7:0] opcode, input word_t p [10],
                                    input logic bad_hec = 1'b0);
    cell_t c;
    c[0] = mk_hdr(vci);
    c[1] = {ref_hec(c[0]) ^ (bad_hec ? 8'h01 : 8'h00), 24'h000000};
    c[2] = {modid, opcode, 16'($urandom)};
    for (int i = 0; i < 10; i++) c[3+i] = p[i];
    c[13] = $urandom;
    return c;
  endfunction

  function automatic word_t sram_cmd(input logic rd, input logic dev,
                                     input int burst, input logic [18:0] addr);
    return {rd, dev, 3'(burst - 1), 8'h00, addr};
  endfunction

  function automatic word_t stat_cmd(input logic rd, input logic [7:0] ev);
    return {rd, 14'h0, ev[7:0], 9'h000};
  endfunction

  // Contents of SRAM locations never written.
  function automatic word_t sram_init(input int dev, input logic [18:0] addr);
    return {5'(dev), 8'hA5, addr} ^ 32'h1234_0000;
  endfunction

endpackage
