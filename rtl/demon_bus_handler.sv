// demon_bus_handler - splits the slow-control address space into segments.
//
// First stage of the two-stage address resolution: the upper address byte
// picks one of four segments (ROM 0x10xx, configuration cells 0x18xx, FIFO
// cells 0x20xx, register cells 0x30xx) and the request is forwarded, in the
// same cycle, to that segment only; the segment's own multiplexer resolves
// the low byte.  Writes are allowed only to configuration cells.  A request
// for any other segment, or a write elsewhere, is answered here with
// unknown_addr one cycle later.  The responses of the segments are merged
// by OR: only the addressed segment answers, so at most one is active.
// The segment map follows the design description; forwarding in the same
// cycle and answering errors here are this implementation's choices.
module demon_bus_handler
  import demon_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sc_req_t req,
  output sc_rsp_t rsp,
  output sc_req_t rom_req,
  input  sc_rsp_t rom_rsp,
  output sc_req_t cfg_req,
  input  sc_rsp_t cfg_rsp,
  output sc_req_t fifo_req,
  input  sc_rsp_t fifo_rsp,
  output sc_req_t reg_req,
  input  sc_rsp_t reg_rsp
);

  logic [7:0] seg;
  logic       is_rom, is_cfg, is_fifo, is_reg, bad;
  logic       err;

  assign seg     = req.addr[15:8];
  assign is_rom  = (seg == SEG_ROM)  && !req.write;
  assign is_cfg  = (seg == SEG_CFG);
  assign is_fifo = (seg == SEG_FIFO) && !req.write;
  assign is_reg  = (seg == SEG_REG)  && !req.write;
  assign bad     = (req.read || req.write) && !(is_rom || is_cfg || is_fifo || is_reg);

  function automatic sc_req_t gate(sc_req_t r, logic sel);
    sc_req_t g = r;
    g.read  = r.read  && sel;
    g.write = r.write && sel;
    return g;
  endfunction

  assign rom_req  = gate(req, is_rom);
  assign cfg_req  = gate(req, is_cfg);
  assign fifo_req = gate(req, is_fifo);
  assign reg_req  = gate(req, is_reg);

  always_ff @(posedge clk) begin
    if (rst) err <= 1'b0;
    else     err <= bad;
  end

  always_comb begin
    rsp = rom_rsp | cfg_rsp | fifo_rsp | reg_rsp;
    rsp.unknown_addr = rsp.unknown_addr | err;
  end

endmodule
