// tb_cfg_cell - self-checking test of the configuration cell.
// Checks the reset value, a full write, that the reset bit stays high for
// exactly one cycle while the other bits hold, and that a later write wins.
module tb_cfg_cell;
  localparam int CFG_SIZE = 4;
  logic clk = 1'b0, rst = 1'b1, wr_en = 1'b0;
  logic [CFG_SIZE-1:0] wr_data = '0, cfg;
  int checks = 0, failures = 0;

  cfg_cell #(.CFG_SIZE(CFG_SIZE), .INIT(32'h2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [CFG_SIZE-1:0] exp, input string what);
    checks++;
    if (cfg !== exp) begin
      failures++;
      $display("FAIL %s: cfg=%h expected %h", what, cfg, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1 check(4'h2, "init value");
    wr_en <= 1'b1; wr_data <= 4'b1100;
    @(posedge clk); #1 wr_en <= 1'b0; check(4'hC, "write");
    @(posedge clk); #1 check(4'hC, "hold");
    wr_en <= 1'b1; wr_data <= 4'b1011;
    @(posedge clk); #1 wr_en <= 1'b0; check(4'hB, "reset bit set");
    @(posedge clk); #1 check(4'hA, "reset bit self-clears");
    @(posedge clk); #1 check(4'hA, "other bits kept");
    wr_en <= 1'b1; wr_data <= 4'b0000;
    @(posedge clk); #1 wr_en <= 1'b0; check(4'h0, "clear all");
    rst <= 1'b1;
    @(posedge clk); #1 rst <= 1'b0; check(4'h2, "reset reloads init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
