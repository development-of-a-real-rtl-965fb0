// tb_data_cell - self-checking test of one complete FIFO cell.
// The raw input and the timer both count clock cycles, as in the hardware
// bring-up of the design.  Checks: packets written every 2nd cycle (the
// stored counter steps by 2), timestamp = timer bits 3..6, event bits,
// control-bit marking, "no more data" on an empty cell, halt, ringbuffer
// mode keeping the newest packets, standard mode keeping the oldest, and
// the reset configuration bit.
module tb_data_cell;
  import demon_pkg::*;
  localparam int DEPTH = 32, DS = 26, TS = 4, ES = 2, CB = 4, TRES = 3, FREQ = 1;
  localparam int LIMIT = DEPTH - $clog2(DEPTH);
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] data_in, time_in;
  logic [15:0] evt_in = 16'h0005;
  logic [3:0]  ctrl_in = 4'hA;
  logic [3:0]  config_in = 4'b1000;   // halted
  logic        read_in = 1'b0;
  logic [39:0] data_out;
  logic        ready_out, no_more_data_out, fake_read, dropped;
  logic [1:0]  nwords;
  logic [$clog2(DEPTH):0] count;
  int cyc = 0;
  int checks = 0, failures = 0;

  data_cell #(.BUS_WIDTH(32), .DEPTH(DEPTH), .CTRL_BITS(CB), .RINGBUF(1'b1), .FREQ(FREQ),
              .TIMER_RES(TRES), .TIME_SIZE(TS), .DATA_SIZE(DS), .EVENT_SIZE(ES), .CFG_SIZE(4)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign data_in = 32'(cyc);
  assign time_in = 32'(cyc);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // read one packet; returns 0 when the cell reported no more data
  task automatic rd(output bit ok, output logic [39:0] w);
    @(negedge clk); read_in = 1'b1;
    @(negedge clk); read_in = 1'b0;
    ok = ready_out; w = data_out;
    chk(ready_out ^ no_more_data_out, "exactly one read answer");
  endtask

  // drain the cell, check packet format and step, return count and last data
  task automatic drain(output int n, output int first, output int last);
    bit ok; logic [39:0] w; int prev = -1;
    n = 0; first = -1; last = -1;
    forever begin
      rd(ok, w);
      if (!ok) break;
      chk(w[31:30] == 2'(evt_in), "event field");
      chk(w[29:26] == 4'(w[25:0] >> TRES), "timestamp field");
      chk(w[35:32] == ctrl_in, "control bits");
      chk(w[39:36] == 4'h0, "zero extension");
      if (prev >= 0) chk(int'(w[25:0]) - prev == (1 << FREQ), "frequency step");
      if (first < 0) first = int'(w[25:0]);
      prev = int'(w[25:0]); last = prev; n++;
    end
  endtask

  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n, first, last, t0, maxcnt;
    repeat (3) @(negedge clk); rst = 1'b0;
    chk(nwords == 2'd2, "36-bit word needs two reads");
    // 20 cycles unhalted, standard mode -> 10 packets
    @(negedge clk); config_in = 4'b0000;
    repeat (20) @(negedge clk);
    config_in = 4'b1000;
    repeat (3) @(negedge clk);
    drain(n, first, last);
    chk(n == 10, $sformatf("10 packets in 20 cycles, got %0d", n));
    // standard mode overfill: oldest packets kept
    @(negedge clk); t0 = cyc; config_in = 4'b0000;
    repeat (200) @(negedge clk);
    config_in = 4'b1000; repeat (3) @(negedge clk);
    chk(count == DEPTH, "standard mode full");
    drain(n, first, last);
    chk(n == DEPTH && first - t0 <= 2, $sformatf("oldest kept: n=%0d first=%0d start=%0d", n, first, t0));
    // ringbuffer mode: newest packets kept, never full
    @(negedge clk); config_in = 4'b0010; maxcnt = 0;
    for (int i = 0; i < 200; i++) begin @(negedge clk); if (count > maxcnt) maxcnt = count; end
    config_in = 4'b1010; t0 = cyc; repeat (3) @(negedge clk);
    chk(maxcnt <= LIMIT, $sformatf("ringbuffer bounded: %0d", maxcnt));
    drain(n, first, last);
    chk(n >= LIMIT - 1 && t0 - last <= 3, $sformatf("newest kept: n=%0d last=%0d stop=%0d", n, last, t0));
    // reset bit clears the FIFO
    @(negedge clk); config_in = 4'b0000; repeat (10) @(negedge clk);
    config_in = 4'b1001; @(negedge clk); config_in = 4'b1000; @(negedge clk); @(negedge clk);
    chk(count == 0, "reset bit clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
