// demon_fifo - storage of one FIFO cell, standard or ringbuffer mode.
//
// A synchronous FIFO of DEPTH words (power of two) with a registered read
// port, standing for the block-RAM and LUT FIFOs of the FIFO catalogue.
// Standard mode: a write to a full FIFO is dropped (`dropped` pulses), so the
// FIFO keeps the oldest values.  Ringbuffer mode (only if RINGBUF=1 and
// ring_mode is set): once the fill count reaches LIMIT = DEPTH - log2(DEPTH)
// and no real read is pending, the FIFO performs a "fake read" that discards
// the oldest word, so the contents stay up to date and the FIFO never fills.
// Flag t1 marks the cycle of the fake read, t2 the next cycle, in which the
// popped word is suppressed; a real read in the same cycle takes precedence
// and raises neither flag.
//
// Interface/timing: wr_en/wr_data write in the cycle presented.  rd_en pops
// a word; one cycle later rd_valid is high with rd_data, or no_more_data is
// high if the FIFO was empty.  `clear` empties the FIFO.  The limit equation
// and the t1/t2 behaviour follow the design description; the register-based
// memory stands in for the vendor FIFO cores.
module demon_fifo #(
  parameter int WIDTH   = 36,
  parameter int DEPTH   = 32,
  parameter bit RINGBUF = 1'b1,
  localparam int AW     = $clog2(DEPTH),
  localparam int LIMIT  = DEPTH - AW
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             ring_mode,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             no_more_data,
  output logic             t1,
  output logic             t2,
  output logic             dropped,
  output logic [AW:0]      count,
  output logic             empty,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             ring, real_rd, fake_rd, pop, push;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign ring    = RINGBUF && ring_mode;
  assign real_rd = rd_en && !empty;
  assign fake_rd = ring && !rd_en && (count >= (AW+1)'(LIMIT));
  assign pop     = real_rd || fake_rd;
  assign push    = wr_en && (!full || pop);
  assign t1      = fake_rd;

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= wr_data;
    if (pop)  rd_data   <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wptr         <= '0;
      rptr         <= '0;
      count        <= '0;
      rd_valid     <= 1'b0;
      no_more_data <= 1'b0;
      t2           <= 1'b0;
      dropped      <= 1'b0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
      count        <= count + (AW+1)'(push) - (AW+1)'(pop);
      rd_valid     <= real_rd;
      no_more_data <= rd_en && empty;
      t2           <= fake_rd;
      dropped      <= wr_en && !push;
    end
  end

endmodule
