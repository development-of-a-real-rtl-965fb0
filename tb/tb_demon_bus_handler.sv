// tb_demon_bus_handler - self-checking test of the segment decoder.
// Behavioural segments answer every request they receive one cycle later
// with a segment-specific data word.  Checks: each address reaches exactly
// its segment, writes reach only the configuration segment, foreign
// segments and writes to read-only segments answer unknown_addr, and every
// request gets exactly one response.
module tb_demon_bus_handler;
  import demon_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sc_req_t req = '0, rom_req, cfg_req, fifo_req, reg_req;
  sc_rsp_t rsp, rom_rsp, cfg_rsp, fifo_rsp, reg_rsp;
  int checks = 0, failures = 0;

  demon_bus_handler dut (.*);

  always #5 clk = ~clk;

  function automatic sc_rsp_t seg_answer(sc_req_t r, logic [31:0] tag);
    sc_rsp_t a = '0;
    a.dataready = r.read;
    a.write_ack = r.write;
    a.data      = r.read ? (tag | 32'(r.addr[7:0])) : '0;
    return a;
  endfunction

  always_ff @(posedge clk) begin
    rom_rsp  <= rst ? '0 : seg_answer(rom_req,  32'h1000_0000);
    cfg_rsp  <= rst ? '0 : seg_answer(cfg_req,  32'h1800_0000);
    fifo_rsp <= rst ? '0 : seg_answer(fifo_req, 32'h2000_0000);
    reg_rsp  <= rst ? '0 : seg_answer(reg_req,  32'h3000_0000);
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic access(input bit wr, input logic [15:0] a, output sc_rsp_t r);
    int n;
    @(negedge clk); req.read = !wr; req.write = wr; req.addr = a; req.data = 32'h5;
    #1 n = int'(rom_req.read | rom_req.write) + int'(cfg_req.read | cfg_req.write)
         + int'(fifo_req.read | fifo_req.write) + int'(reg_req.read | reg_req.write);
    chk(n <= 1, "at most one segment selected");
    @(negedge clk); req = '0; r = rsp;
    @(negedge clk); chk(rsp == '0, "single response");
  endtask

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sc_rsp_t r;
    logic [15:0] seg_base [4] = '{16'h1000, 16'h1800, 16'h2000, 16'h3000};
    repeat (3) @(negedge clk); rst = 1'b0;
    foreach (seg_base[s]) begin
      access(0, seg_base[s] + 16'h7, r);
      chk(r.dataready && r.data == ({seg_base[s], 16'h0} | 32'h7), $sformatf("read segment %h", seg_base[s]));
      access(1, seg_base[s] + 16'h3, r);
      if (s == 1) chk(r.write_ack && !r.unknown_addr, "write to configuration cells");
      else        chk(r.unknown_addr && !r.write_ack, $sformatf("write refused for %h", seg_base[s]));
    end
    access(0, 16'h0000, r); chk(r.unknown_addr && !r.dataready, "segment 0x00 unknown");
    access(0, 16'h4000, r); chk(r.unknown_addr, "segment 0x40 unknown");
    access(1, 16'h1900, r); chk(r.unknown_addr, "write to 0x19 unknown");
    access(0, 16'hFFFF, r); chk(r.unknown_addr, "0xFFFF unknown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
