// register_cell - plain flip-flop storage of one register input segment.
//
// For slow signals that need no buffering (temperatures, voltages, states)
// DEMON uses registers instead of FIFOs: every clock cycle the cell samples
// the low WIDTH bits of its input segment and marks the value with the low
// CTRL_BITS bits of its control-port slice, stored directly above the data.
// The output is zero-extended to BUS_WIDTH+MAX_CTRL bits; nwords is the
// number of 32-bit reads the word needs.  Timing: value follows data_in with
// one cycle of latency; reset clears it.  Sampling every cycle is this
// implementation's reading of "direct insight on the present state".
module register_cell
  import demon_pkg::*;
#(
  parameter int BUS_WIDTH = 64,
  parameter int WIDTH     = 64,
  parameter int CTRL_BITS = 0,
  localparam int OUT_W    = BUS_WIDTH + MAX_CTRL
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [BUS_WIDTH-1:0]   data_in,
  input  logic [CTRL_PORT_W-1:0] ctrl_in,
  output logic [OUT_W-1:0]       value,
  output logic [1:0]             nwords
);

  logic [OUT_W-1:0] next;

  assign nwords = 2'(n_words(WIDTH + CTRL_BITS));

  always_comb begin
    next = '0;
    for (int b = 0; b < WIDTH; b++)     next[b] = data_in[b];
    for (int b = 0; b < CTRL_BITS; b++) next[WIDTH + b] = ctrl_in[b];
  end

  always_ff @(posedge clk) begin
    if (rst) value <= '0;
    else     value <= next;
  end

  initial begin
    assert (WIDTH <= BUS_WIDTH) else $error("register_cell: register wider than the bus");
    assert (CTRL_BITS <= CTRL_PORT_W) else $error("register_cell: too many control bits");
  end

endmodule
