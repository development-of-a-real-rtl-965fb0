// fifo_controller - input filter in front of one monitoring FIFO.
//
// Three jobs, as described for the DEMON FIFO controller:
//   * frequency regulation: a free-running counter releases a write once
//     every 2**FREQ clock cycles (FREQ = 0: every cycle, 15: every 32768);
//   * input validation: when `validate` is set, a value equal to the last
//     one written is not written again (the comparison register keeps the
//     last written raw data);
//   * packing: the raw data (low DATA_SIZE bits of the input segment) is
//     joined with a timestamp, the timer bits TIMER_RES..TIMER_RES+TIME_SIZE-1,
//     and the low EVENT_SIZE bits of the event number, and marked with the
//     low CTRL_BITS bits of the control port.
// Packet layout, MSB first: {ctrl, event, time, data}; the ctrl field lies
// outside the packet width (it is the block-RAM parity field).
// `halt` blocks writes; `clear` restarts the counter and forgets the
// comparison value.  Timing: wr_en/wr_data are registered, one cycle after
// the sampled input.  Placing the event number above the timestamp, and the
// validation register holding only the raw data, are this implementation's
// choices.
module fifo_controller
  import demon_pkg::*;
#(
  parameter int BUS_WIDTH  = 32,
  parameter int FREQ       = 0,
  parameter int TIMER_RES  = 0,
  parameter int TIME_SIZE  = 4,
  parameter int DATA_SIZE  = 26,
  parameter int EVENT_SIZE = 2,
  parameter int CTRL_BITS  = 4,
  localparam int WIDTH     = DATA_SIZE + TIME_SIZE + EVENT_SIZE,
  localparam int WORD_W    = WIDTH + CTRL_BITS
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clear,
  input  logic                   validate,
  input  logic                   halt,
  input  logic [BUS_WIDTH-1:0]   data_in,
  input  logic [TIMER_W-1:0]     time_in,
  input  logic [EVENT_W-1:0]     event_in,
  input  logic [CTRL_PORT_W-1:0] ctrl_in,
  output logic                   wr_en,
  output logic [WORD_W-1:0]      wr_data
);

  localparam int CNT_W = (FREQ < 1) ? 1 : FREQ;

  logic [CNT_W-1:0]     cnt;
  logic                 tick;
  logic [DATA_SIZE-1:0] raw;
  logic [DATA_SIZE-1:0] last;
  logic                 have_last;
  logic                 same;
  logic                 write;
  logic [63:0]          time_ext;
  logic [63:0]          event_ext;
  logic [63:0]          ctrl_ext;
  logic [WORD_W-1:0]    packet;

  assign raw   = data_in[DATA_SIZE-1:0];
  assign tick  = (FREQ == 0) ? 1'b1 : (&cnt);
  assign same  = validate && have_last && (raw == last);
  assign write = tick && !halt && !same;

  // timestamp, event and control fields; unused sizes of 0 drop out
  assign time_ext  = 64'(time_in) >> TIMER_RES;
  assign event_ext = 64'(event_in);
  assign ctrl_ext  = 64'(ctrl_in);

  always_comb begin
    packet = '0;
    packet[DATA_SIZE-1:0] = raw;
    for (int b = 0; b < TIME_SIZE; b++)  packet[DATA_SIZE + b] = time_ext[b];
    for (int b = 0; b < EVENT_SIZE; b++) packet[DATA_SIZE + TIME_SIZE + b] = event_ext[b];
    for (int b = 0; b < CTRL_BITS; b++)  packet[WIDTH + b] = ctrl_ext[b];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      cnt       <= '0;
      have_last <= 1'b0;
      last      <= '0;
      wr_en     <= 1'b0;
      wr_data   <= '0;
    end else begin
      cnt   <= (FREQ == 0) ? '0 : cnt + 1'b1;
      wr_en <= write;
      if (write) begin
        wr_data   <= packet;
        last      <= raw;
        have_last <= 1'b1;
      end
    end
  end

endmodule
