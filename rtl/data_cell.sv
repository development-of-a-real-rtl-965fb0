// data_cell - one complete FIFO cell of the monitoring unit.
//
// Joins a fifo_controller (frequency regulation, validation, timestamping,
// control-bit marking) and a demon_fifo (standard or ringbuffer storage) and
// connects them to the cell's configuration bits: reset clears both, the
// ringbuffer bit switches the FIFO mode, validate and halt act on the
// controller.  The parameters are the FIFO properties of the configuration
// file (width, depth, control bits, ringbuffer variant, frequency, timer
// resolution, time/data/event size); the timer itself is selected outside.
//
// Read side: read_in pops one packet; one cycle later ready_out is high with
// data_out, or no_more_data_out if the FIFO was empty.  data_out holds the
// packet in its low WIDTH bits and the control bits directly above it,
// zero-extended to BUS_WIDTH+MAX_CTRL bits; nwords tells the multiplexer
// how many 32-bit reads the word needs.  The status outputs (fake_read,
// dropped, count) are for observation only.
module data_cell
  import demon_pkg::*;
#(
  parameter int BUS_WIDTH  = 32,
  parameter int DEPTH      = 2048,
  parameter int CTRL_BITS  = 4,
  parameter bit RINGBUF    = 1'b1,
  parameter int FREQ       = 1,
  parameter int TIMER_RES  = 3,
  parameter int TIME_SIZE  = 4,
  parameter int DATA_SIZE  = 26,
  parameter int EVENT_SIZE = 2,
  parameter int CFG_SIZE   = 4,
  localparam int WIDTH     = DATA_SIZE + TIME_SIZE + EVENT_SIZE,
  localparam int WORD_W    = WIDTH + CTRL_BITS,
  localparam int OUT_W     = BUS_WIDTH + MAX_CTRL
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [BUS_WIDTH-1:0]   data_in,
  input  logic [TIMER_W-1:0]     time_in,
  input  logic [EVENT_W-1:0]     evt_in,
  input  logic [CTRL_PORT_W-1:0] ctrl_in,
  input  logic [CFG_SIZE-1:0]    config_in,
  input  logic                   read_in,
  output logic [OUT_W-1:0]       data_out,
  output logic                   ready_out,
  output logic                   no_more_data_out,
  output logic [1:0]             nwords,
  output logic                   fake_read,
  output logic                   dropped,
  output logic [$clog2(DEPTH):0] count
);

  logic              clear, wr_en, t2, empty, full;
  logic [WORD_W-1:0] wr_data, rd_data;

  assign clear  = config_in[CFG_BIT_RESET];
  assign nwords = 2'(n_words(WORD_W));

  fifo_controller #(
    .BUS_WIDTH (BUS_WIDTH),
    .FREQ      (FREQ),
    .TIMER_RES (TIMER_RES),
    .TIME_SIZE (TIME_SIZE),
    .DATA_SIZE (DATA_SIZE),
    .EVENT_SIZE(EVENT_SIZE),
    .CTRL_BITS (CTRL_BITS)
  ) u_ctrl (
    .clk     (clk),
    .rst     (rst),
    .clear   (clear),
    .validate(config_in[CFG_BIT_VALIDATE]),
    .halt    (config_in[CFG_BIT_HALT]),
    .data_in (data_in),
    .time_in (time_in),
    .event_in(evt_in),
    .ctrl_in (ctrl_in),
    .wr_en   (wr_en),
    .wr_data (wr_data)
  );

  demon_fifo #(
    .WIDTH  (WORD_W),
    .DEPTH  (DEPTH),
    .RINGBUF(RINGBUF)
  ) u_fifo (
    .clk         (clk),
    .rst         (rst),
    .clear       (clear),
    .ring_mode   (config_in[CFG_BIT_RING]),
    .wr_en       (wr_en),
    .wr_data     (wr_data),
    .rd_en       (read_in),
    .rd_data     (rd_data),
    .rd_valid    (ready_out),
    .no_more_data(no_more_data_out),
    .t1          (fake_read),
    .t2          (t2),
    .dropped     (dropped),
    .count       (count),
    .empty       (empty),
    .full        (full)
  );

  assign data_out = OUT_W'(rd_data);

  initial begin
    assert (WIDTH <= BUS_WIDTH) else $error("data_cell: packet wider than the FIFO bus");
    assert (CTRL_BITS <= MAX_CTRL) else $error("data_cell: too many control bits");
    assert (WORD_W <= 3 * SC_DATA_W) else $error("data_cell: word needs more than three reads");
  end

endmodule
