// monitoring_unit - DEMON, a generic on-chip monitoring unit (top level).
//
// The rest of the FPGA hands its monitoring signals over two wide ports:
// fifo_data_in carries FIFO_NUM segments of FIFO_BUS_WIDTH bits, one per
// FIFO cell, and reg_data_in carries REG_NUM segments of REG_BUS_WIDTH bits,
// one per register cell (narrower signals are zero-padded by the caller and
// only their low bits are used).  A control port (4 bits per cell) marks
// the stored values.  For each FIFO the unit generates a data_cell and a
// cfg_cell, with the properties of the setup package, and connects the
// timer chosen by the cell's timer type (none, global, local/system,
// trigger).  A ROM describes the whole setup.  All cells are reached over
// one slow-control port (the RegIO side): demon_bus_handler picks the
// segment, then cfg_mux, fifo_mux, register_mux or the ROM resolve the cell.
//
// Address map: ROM 0x1000-0x106F, configuration cells 0x1800+i, FIFO cells
// 0x2000+i, register cells 0x3000+j.  Only configuration cells are writable.
// Timing: one request at a time; a ROM, configuration or register access is
// answered 1 cycle after the request, a FIFO read after 2 cycles; each
// request gets exactly one response pulse (dataready, no_more_data,
// write_ack or unknown_addr).  Structure, address map and cell behaviour
// follow the design description; the slow-control signal timing is this
// implementation's, since the RegIO module is external.
module monitoring_unit
  import demon_pkg::*;
#(
  parameter int                        FIFO_NUM       = demon_setup_pkg::FIFO_NUM,
  parameter int                        FIFO_BUS_WIDTH = demon_setup_pkg::FIFO_BUS_WIDTH,
  parameter int                        REG_NUM        = demon_setup_pkg::REG_NUM,
  parameter int                        REG_BUS_WIDTH  = demon_setup_pkg::REG_BUS_WIDTH,
  parameter int                        CFG_SIZE       = demon_setup_pkg::CFG_SIZE,
  parameter fifo_cfg_t [FIFO_MAX-1:0]  FIFO_CFG       = demon_setup_pkg::FIFO_CFG,
  parameter reg_cfg_t  [REG_MAX-1:0]   REG_CFG        = demon_setup_pkg::REG_CFG,
  parameter logic [FIFO_MAX-1:0][31:0] CFG_INIT       = demon_setup_pkg::CFG_INIT
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [FIFO_NUM*FIFO_BUS_WIDTH-1:0]  fifo_data_in,
  input  logic [REG_NUM*REG_BUS_WIDTH-1:0]    reg_data_in,
  input  logic [FIFO_NUM*CTRL_PORT_W-1:0]     ctrl_in,
  input  logic [REG_NUM*CTRL_PORT_W-1:0]      reg_ctrl_in,
  input  logic [TIMER_W-1:0]                  global_time_in,
  input  logic [TIMER_W-1:0]                  local_time_in,
  input  logic [TIMER_W-1:0]                  trigger_time_in,
  input  logic [EVENT_W-1:0]                  event_number_in,
  input  sc_req_t                             sc_req,
  output sc_rsp_t                             sc_rsp
);

  localparam int FIFO_WORD_W = FIFO_BUS_WIDTH + MAX_CTRL;
  localparam int REG_WORD_W  = REG_BUS_WIDTH + MAX_CTRL;

  sc_req_t rom_req, cfg_req, fifo_req, reg_req;
  sc_rsp_t rom_rsp, cfg_rsp, fifo_rsp, reg_rsp;

  logic [FIFO_NUM-1:0][CFG_SIZE-1:0]    cfg;
  logic [FIFO_NUM-1:0]                  cfg_wr;
  logic [CFG_SIZE-1:0]                  cfg_wdata;
  logic [FIFO_NUM-1:0]                  fifo_read, fifo_ready, fifo_nomore;
  logic [FIFO_NUM-1:0][FIFO_WORD_W-1:0] fifo_word;
  logic [FIFO_NUM-1:0][1:0]             fifo_nwords;
  logic [REG_NUM-1:0][REG_WORD_W-1:0]   reg_word;
  logic [REG_NUM-1:0][1:0]              reg_nwords;

  demon_bus_handler u_bus (
    .clk(clk), .rst(rst), .req(sc_req), .rsp(sc_rsp),
    .rom_req(rom_req),   .rom_rsp(rom_rsp),
    .cfg_req(cfg_req),   .cfg_rsp(cfg_rsp),
    .fifo_req(fifo_req), .fifo_rsp(fifo_rsp),
    .reg_req(reg_req),   .reg_rsp(reg_rsp)
  );

  demon_rom #(
    .FIFO_NUM(FIFO_NUM), .REG_NUM(REG_NUM),
    .FIFO_CFG(FIFO_CFG), .REG_CFG(REG_CFG), .CFG_INIT(CFG_INIT)
  ) u_rom (
    .clk(clk), .rst(rst), .req(rom_req), .rsp(rom_rsp)
  );

  cfg_mux #(.N(FIFO_NUM), .CFG_SIZE(CFG_SIZE)) u_cfg_mux (
    .clk(clk), .rst(rst), .req(cfg_req), .rsp(cfg_rsp),
    .cfg(cfg), .wr_en(cfg_wr), .wr_data(cfg_wdata)
  );

  fifo_mux #(.N(FIFO_NUM), .WORD_W(FIFO_WORD_W)) u_fifo_mux (
    .clk(clk), .rst(rst), .req(fifo_req), .rsp(fifo_rsp),
    .cell_read(fifo_read), .cell_data(fifo_word), .cell_ready(fifo_ready),
    .cell_nomore(fifo_nomore), .cell_nwords(fifo_nwords)
  );

  register_mux #(.N(REG_NUM), .WORD_W(REG_WORD_W)) u_reg_mux (
    .clk(clk), .rst(rst), .req(reg_req), .rsp(reg_rsp),
    .cell_value(reg_word), .cell_nwords(reg_nwords)
  );

  for (genvar i = 0; i < FIFO_NUM; i++) begin : gen_fifo
    localparam fifo_cfg_t C = FIFO_CFG[i];
    logic [TIMER_W-1:0] timer;

    // timer domain of this cell
    always_comb begin
      case (C.timer_type)
        TIMER_GLOBAL:  timer = global_time_in;
        TIMER_LOCAL:   timer = local_time_in;
        TIMER_TRIGGER: timer = trigger_time_in;
        default:       timer = '0;
      endcase
    end

    cfg_cell #(.CFG_SIZE(CFG_SIZE), .INIT(CFG_INIT[i])) u_cfg (
      .clk(clk), .rst(rst), .wr_en(cfg_wr[i]), .wr_data(cfg_wdata), .cfg(cfg[i])
    );

    data_cell #(
      .BUS_WIDTH (FIFO_BUS_WIDTH),
      .DEPTH     (int'(C.depth)),
      .CTRL_BITS (int'(C.ctrl_bits)),
      .RINGBUF   (C.ftype[7]),
      .FREQ      (int'(C.frequency)),
      .TIMER_RES (int'(C.timer_res)),
      .TIME_SIZE (int'(C.time_size)),
      .DATA_SIZE (int'(C.data_size)),
      .EVENT_SIZE(int'(C.event_size)),
      .CFG_SIZE  (CFG_SIZE)
    ) u_cell (
      .clk             (clk),
      .rst             (rst),
      .data_in         (fifo_data_in[i*FIFO_BUS_WIDTH +: FIFO_BUS_WIDTH]),
      .time_in         (timer),
      .evt_in          (event_number_in),
      .ctrl_in         (ctrl_in[i*CTRL_PORT_W +: CTRL_PORT_W]),
      .config_in       (cfg[i]),
      .read_in         (fifo_read[i]),
      .data_out        (fifo_word[i]),
      .ready_out       (fifo_ready[i]),
      .no_more_data_out(fifo_nomore[i]),
      .nwords          (fifo_nwords[i]),
      .fake_read       (),
      .dropped         (),
      .count           ()
    );
  end

  for (genvar j = 0; j < REG_NUM; j++) begin : gen_reg
    register_cell #(
      .BUS_WIDTH(REG_BUS_WIDTH),
      .WIDTH    (int'(REG_CFG[j].width)),
      .CTRL_BITS(int'(REG_CFG[j].ctrl_bits))
    ) u_reg (
      .clk    (clk),
      .rst    (rst),
      .data_in(reg_data_in[j*REG_BUS_WIDTH +: REG_BUS_WIDTH]),
      .ctrl_in(reg_ctrl_in[j*CTRL_PORT_W +: CTRL_PORT_W]),
      .value  (reg_word[j]),
      .nwords (reg_nwords[j])
    );
  end

  initial begin
    assert (FIFO_NUM >= 1 && FIFO_NUM <= FIFO_MAX) else $error("monitoring_unit: FIFO_NUM out of range");
    assert (REG_NUM >= 1 && REG_NUM <= REG_MAX) else $error("monitoring_unit: REG_NUM out of range");
    assert (CFG_SIZE >= 4 && CFG_SIZE <= 32) else $error("monitoring_unit: CFG_SIZE out of range");
  end

  assert property (@(posedge clk) disable iff (rst) !(sc_req.read && sc_req.write))
    else $error("monitoring_unit: read and write in the same cycle");

endmodule
