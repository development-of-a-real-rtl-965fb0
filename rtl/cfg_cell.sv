// cfg_cell - configuration cell of one FIFO.
//
// The only writable storage of the monitoring unit.  Each bit drives one FIFO
// operation: bit 0 resets the FIFO, bit 1 selects ringbuffer mode, bit 2
// enables input validation and bit 3 halts FIFO writes (see demon_pkg).
// Further bits are stored and read back but drive nothing yet.
//
// Interface: a one-cycle wr_en with wr_data replaces the whole cell; cfg is
// the current value.  Reset loads INIT.  Timing: cfg changes the cycle after
// the write.  Bit 0 is self-clearing: written as 1, it is high for exactly
// one cycle and then returns to 0, so a "reset ON" command produces one FIFO
// clear.  The bit assignment and the initial value come from the design
// description; making the reset bit self-clearing is this implementation's
// choice.
module cfg_cell #(
  parameter int              CFG_SIZE = 4,
  parameter logic [31:0]     INIT     = 32'h0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                wr_en,
  input  logic [CFG_SIZE-1:0] wr_data,
  output logic [CFG_SIZE-1:0] cfg
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg <= INIT[CFG_SIZE-1:0];
    end else if (wr_en) begin
      cfg <= wr_data;
    end else begin
      cfg[demon_pkg::CFG_BIT_RESET] <= 1'b0;
    end
  end

endmodule
