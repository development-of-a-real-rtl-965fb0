// tb_demon_rom - self-checking test of the setup ROM at its default setup.
// Expected words are written out by hand from the default setup: FIFO 0
// (32x2048 ringbuffer BRAM, frequency 1, trigger timer, resolution 3,
// sizes 4/26/2, 4 control bits, configuration 0x2), FIFO 5 (16x2048 BRAM,
// no timer), registers 0, 8 and 11; unused cells must read zero, indices
// past 111 and writes must answer unknown_addr.
module tb_demon_rom;
  import demon_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sc_req_t req = '0;
  sc_rsp_t rsp;
  int checks = 0, failures = 0;

  demon_rom dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic rd(input int idx, input logic [31:0] exp);
    @(negedge clk); req.read = 1'b1; req.addr = 16'h1000 + 16'(idx);
    @(negedge clk); req = '0;
    chk(rsp.dataready && !rsp.unknown_addr && rsp.data == exp,
        $sformatf("word %0d = %h expected %h", idx, rsp.data, exp));
  endtask

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst = 1'b0;
    rd(0, 32'h8620_0800); rd(1, 32'h0103_0304); rd(2, 32'h1A02_040B); rd(3, 32'h0000_0002);
    rd(20, 32'h0210_0800); rd(21, 32'h0000_0000); rd(22, 32'h1000_020B); rd(23, 32'h0);
    rd(80, 32'h0000_0040); rd(88, 32'h0004_001C); rd(91, 32'h0004_000C);
    for (int i = 32; i < 80; i++) rd(i, 32'h0);
    for (int i = 92; i < 112; i++) rd(i, 32'h0);
    @(negedge clk); req.read = 1'b1; req.addr = 16'h1070;
    @(negedge clk); req = '0; chk(rsp.unknown_addr && !rsp.dataready, "index 112 unknown");
    @(negedge clk); req.write = 1'b1; req.addr = 16'h1000;
    @(negedge clk); req = '0; chk(rsp.unknown_addr && !rsp.write_ack, "ROM write refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
