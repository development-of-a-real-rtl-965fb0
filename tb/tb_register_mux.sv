// tb_register_mux - self-checking test of the register-cell multiplexer.
// Register values change every cycle; a 64-bit register must return both
// halves of the same sample, a 32-bit one a single piece, and an index of
// N or more unknown_addr.  Reads are answered one cycle later.
module tb_register_mux;
  import demon_pkg::*;
  localparam int N = 3, WW = 72;
  logic clk = 1'b0, rst = 1'b1;
  sc_req_t req = '0;
  sc_rsp_t rsp;
  logic [N-1:0][WW-1:0] cell_value;
  logic [N-1:0][1:0] cell_nwords;
  int cyc = 0;
  int checks = 0, failures = 0;

  register_mux #(.N(N), .WORD_W(WW)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign cell_nwords = {2'd2, 2'd1, 2'd2};
  always_comb
    for (int i = 0; i < N; i++) cell_value[i] = {8'h0, 32'(cyc) ^ 32'hFFFF_0000, 16'(i), 16'(cyc)};

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic rd(input int idx, output sc_rsp_t r, output int c);
    @(negedge clk); req.read = 1'b1; req.addr = 16'h3000 + 16'(idx); c = cyc;
    @(negedge clk); req = '0; r = rsp;
  endtask

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sc_rsp_t r; int c0, c1;
    repeat (3) @(negedge clk); rst = 1'b0;
    for (int k = 0; k < 5; k++) begin
      rd(0, r, c0); chk(r.dataready && r.data == {16'h0, 16'(c0)}, "reg0 low");
      repeat (k) @(negedge clk);
      rd(0, r, c1); chk(r.dataready && r.data == (32'(c0) ^ 32'hFFFF_0000), "reg0 high same sample");
      rd(1, r, c0); chk(r.data == {16'h1, 16'(c0)}, "reg1 single");
      rd(1, r, c1); chk(r.data == {16'h1, 16'(c1)}, "reg1 fresh sample");
    end
    rd(2, r, c0); rd(1, r, c1); rd(2, r, c1);
    chk(r.data == {16'h2, 16'(c1)}, "kept word dropped by other address");
    rd(N, r, c0); chk(r.unknown_addr && !r.dataready, "unknown address");
    rd(255, r, c0); chk(r.unknown_addr, "unknown address 0xff");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
