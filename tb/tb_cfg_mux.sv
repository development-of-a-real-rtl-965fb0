// tb_cfg_mux - self-checking test of the configuration-cell multiplexer.
// Drives reads and writes for each index, checks the per-cell write strobe,
// the returned data, write acknowledge, and unknown_addr beyond N.
module tb_cfg_mux;
  import demon_pkg::*;
  localparam int N = 5, CFG_SIZE = 4;
  logic clk = 1'b0, rst = 1'b1;
  sc_req_t req = '0;
  sc_rsp_t rsp;
  logic [N-1:0][CFG_SIZE-1:0] cfg;
  logic [N-1:0] wr_en;
  logic [CFG_SIZE-1:0] wr_data;
  int checks = 0, failures = 0;

  cfg_mux #(.N(N), .CFG_SIZE(CFG_SIZE)) dut (.*);

  always #5 clk = ~clk;

  // cells modelled behaviourally
  always_ff @(posedge clk)
    for (int i = 0; i < N; i++) if (rst) cfg[i] <= CFG_SIZE'(i); else if (wr_en[i]) cfg[i] <= wr_data;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input bit wr, input int idx, input logic [31:0] d, output sc_rsp_t r);
    req.read <= !wr; req.write <= wr; req.addr <= 16'h1800 + 16'(idx); req.data <= d;
    #1;
    if (wr) chk(wr_en == ((idx < N) ? (N'(1) << idx) : '0), "write strobe one-hot");
    else    chk(wr_en == '0, "no strobe on read");
    @(posedge clk); req <= '0;
    #1 r = rsp;
    @(posedge clk);
    #1 chk(rsp == SC_RSP_IDLE, "single response pulse");
  endtask

  initial begin
    #50000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sc_rsp_t r;
    repeat (3) @(posedge clk); rst <= 1'b0; @(posedge clk);
    for (int i = 0; i < N; i++) begin
      access(0, i, 0, r);
      chk(r.dataready && r.data == 32'(i), $sformatf("read init %0d", i));
    end
    for (int i = 0; i < N; i++) begin
      access(1, i, 32'(4'hF - i), r);
      chk(r.write_ack && !r.dataready && !r.unknown_addr, $sformatf("write ack %0d", i));
    end
    for (int i = 0; i < N; i++) begin
      access(0, i, 0, r);
      chk(r.dataready && r.data == 32'(4'hF - i), $sformatf("read back %0d", i));
    end
    access(0, N, 0, r);   chk(r.unknown_addr && !r.dataready, "read beyond N");
    access(1, N+3, 1, r); chk(r.unknown_addr && !r.write_ack, "write beyond N");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
