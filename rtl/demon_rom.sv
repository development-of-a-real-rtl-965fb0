// demon_rom - self-description of the monitoring setup (0x1000..0x106F).
//
// Software learns what a chip monitors only from this ROM, so no central
// database is needed.  Its 112 words are computed at elaboration time from
// the setup parameters:
//   words 4*i .. 4*i+3 (i = 0..19), FIFO cell i:
//     +0  {type[7:0], width[7:0], depth[15:0]}
//     +1  {frequency[7:0], timer type[7:0], timer resolution[7:0], time size[7:0]}
//     +2  {data size[7:0], event size[7:0], control bits[7:0], log2 depth[7:0]}
//     +3  initial configuration-cell value
//   word 80+j (j = 0..31), register cell j: {8'h0, control bits[7:0], width[15:0]}
// Cells that do not exist read as zero (type 0 / width 0 ends the list).
// Interface: req is the decoded request for this segment; a read of word
// 0..111 answers dataready with the word one cycle later, anything else
// (higher index or a write) answers unknown_addr.  The layout and the four
// words per FIFO follow the design description; the packing of the fields
// into each word is this implementation's choice.
module demon_rom
  import demon_pkg::*;
#(
  parameter int                          FIFO_NUM = demon_setup_pkg::FIFO_NUM,
  parameter int                          REG_NUM  = demon_setup_pkg::REG_NUM,
  parameter fifo_cfg_t [FIFO_MAX-1:0]    FIFO_CFG = demon_setup_pkg::FIFO_CFG,
  parameter reg_cfg_t  [REG_MAX-1:0]     REG_CFG  = demon_setup_pkg::REG_CFG,
  parameter logic [FIFO_MAX-1:0][31:0]   CFG_INIT = demon_setup_pkg::CFG_INIT
) (
  input  logic    clk,
  input  logic    rst,
  input  sc_req_t req,
  output sc_rsp_t rsp
);

  typedef logic [ROM_DEPTH-1:0][31:0] rom_t;

  function automatic rom_t build_rom();
    rom_t r = '0;
    for (int i = 0; i < FIFO_MAX; i++) begin
      if (i < FIFO_NUM) begin
        r[4*i]   = {FIFO_CFG[i].ftype, FIFO_CFG[i].width[7:0], FIFO_CFG[i].depth};
        r[4*i+1] = {FIFO_CFG[i].frequency, FIFO_CFG[i].timer_type,
                    FIFO_CFG[i].timer_res, FIFO_CFG[i].time_size};
        r[4*i+2] = {FIFO_CFG[i].data_size, FIFO_CFG[i].event_size,
                    FIFO_CFG[i].ctrl_bits, FIFO_CFG[i].log_depth};
        r[4*i+3] = CFG_INIT[i];
      end
    end
    for (int j = 0; j < REG_MAX; j++) begin
      if (j < REG_NUM) r[4*FIFO_MAX+j] = {8'h00, REG_CFG[j].ctrl_bits, REG_CFG[j].width};
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  logic [7:0] idx;
  logic       hit;

  assign idx = req.addr[7:0];
  assign hit = 32'(idx) < ROM_DEPTH;

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp <= SC_RSP_IDLE;
    end else begin
      rsp <= SC_RSP_IDLE;
      if (req.write || (req.read && !hit)) begin
        rsp.unknown_addr <= 1'b1;
      end else if (req.read) begin
        rsp.data      <= ROM[idx];
        rsp.dataready <= 1'b1;
      end
    end
  end

endmodule
