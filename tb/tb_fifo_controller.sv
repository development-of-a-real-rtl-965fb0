// tb_fifo_controller - self-checking test of the FIFO controller.
// Phase 1: free run at frequency 2 -> one write every 4 cycles; every
//          packet is compared with a packing model of the sampled inputs
//          (data, timer >> resolution, event number, control bits).
// Phase 2: input validation with a slowly changing input -> only changes
//          are written.
// Phase 3: halt -> no writes.
module tb_fifo_controller;
  import demon_pkg::*;
  localparam int FREQ = 2, TRES = 2, TS = 4, DS = 10, ES = 3, CB = 2;
  localparam int W = DS + TS + ES + CB;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, validate = 1'b0, halt = 1'b0;
  logic [31:0] data_in, time_in;
  logic [15:0] event_in;
  logic [3:0]  ctrl_in;
  logic        wr_en;
  logic [W-1:0] wr_data;
  int cyc = 0, slow = 0;
  int checks = 0, failures = 0;
  int writes = 0, last_write = -1;
  bit use_slow = 0;

  fifo_controller #(.BUS_WIDTH(32), .FREQ(FREQ), .TIMER_RES(TRES), .TIME_SIZE(TS),
                    .DATA_SIZE(DS), .EVENT_SIZE(ES), .CTRL_BITS(CB)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  assign data_in  = use_slow ? 32'(slow) : 32'(cyc * 3 + 32'h5A5A_0000);
  assign time_in  = 32'(cyc * 7);
  assign event_in = 16'(cyc + 100);
  assign ctrl_in  = 4'(cyc);

  function automatic logic [W-1:0] model(int c, int s, bit sl);
    logic [31:0] d = sl ? 32'(s) : 32'(c * 3 + 32'h5A5A_0000);
    logic [31:0] t = 32'(c * 7) >> TRES;
    logic [15:0] e = 16'(c + 100);
    logic [3:0]  k = 4'(c);
    return {k[CB-1:0], e[ES-1:0], t[TS-1:0], d[DS-1:0]};
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  int prev_slow, slow_writes = 0;
  bit prev_mode, prev_halt;
  always @(negedge clk) begin
    if (!rst && wr_en) begin
      writes++;
      if (prev_mode) slow_writes++;
      chk(wr_data == model(cyc - 1, prev_slow, prev_mode), "packet contents");
      if (!prev_mode && last_write >= 0) chk(cyc - last_write == (1 << FREQ), "write period 2^FREQ");
      last_write = cyc;
    end
    if (prev_halt) last_write = -1;
  end
  always @(posedge clk) begin
    prev_slow <= slow;
    prev_mode <= use_slow;
    prev_halt <= halt;
  end

  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int w0, changes;
    repeat (3) @(posedge clk); rst <= 1'b0;
    repeat (400) @(posedge clk);
    chk(writes >= 99 && writes <= 100, $sformatf("write count %0d in 400 cycles", writes));
    // phase 2: validation
    @(negedge clk); use_slow = 1; validate = 1; last_write = -1;
    changes = 0;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      if (k % 12 == 11) begin slow = slow + 1; changes++; end
    end
    repeat (8) @(negedge clk);
    chk(slow_writes == changes + 1, $sformatf("validated writes %0d expected %0d", slow_writes, changes + 1));
    // phase 3: halt
    validate = 0; use_slow = 0; halt = 1; w0 = writes;
    repeat (50) @(negedge clk);
    chk(writes == w0, "no writes while halted");
    halt = 0;
    repeat (20) @(negedge clk);
    chk(writes > w0, "writes resume after halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
