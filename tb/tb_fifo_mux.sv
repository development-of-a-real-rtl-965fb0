// tb_fifo_mux - self-checking test of the FIFO-cell multiplexer.
// Behavioural cells answer a read strobe one cycle later with a 64-bit
// word (cell index and a per-cell sequence number) or, when marked empty,
// with "no more data".  Checks: only the addressed cell is strobed, the
// 3-cycle latency, one- two- and three-piece words, that a second piece
// does not pop the cell again, that another address drops a kept word, and
// unknown_addr beyond N.
module tb_fifo_mux;
  import demon_pkg::*;
  localparam int N = 4, WW = 96;
  logic clk = 1'b0, rst = 1'b1;
  sc_req_t req = '0;
  sc_rsp_t rsp;
  logic [N-1:0] cell_read, cell_ready = '0, cell_nomore = '0, empty = '0;
  logic [N-1:0][WW-1:0] cell_data;
  logic [N-1:0][1:0] cell_nwords;
  int seq [N];
  int checks = 0, failures = 0;

  fifo_mux #(.N(N), .WORD_W(WW)) dut (.*);

  always #5 clk = ~clk;

  assign cell_nwords = {2'd3, 2'd1, 2'd2, 2'd1};   // cells 3..0

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      cell_ready[i]  <= cell_read[i] && !empty[i];
      cell_nomore[i] <= cell_read[i] && empty[i];
      if (rst) seq[i] <= 0;
      else if (cell_read[i] && !empty[i]) begin
        seq[i] <= seq[i] + 1;
        cell_data[i] <= {32'(i) | 32'hC000_0000, 32'(i) | 32'hB000_0000, 16'(i), 16'(seq[i])};
      end
    end
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one read; returns the response and its latency in cycles
  task automatic rd(input int idx, output sc_rsp_t r, output int lat);
    @(negedge clk); req.read = 1'b1; req.addr = 16'h2000 + 16'(idx);
    #1 chk(cell_read == ((idx < N) ? (N'(1) << idx) : '0) || cell_read == '0, "strobe only addressed cell");
    @(negedge clk); req = '0; lat = 1;
    while (!(rsp.dataready || rsp.no_more_data || rsp.unknown_addr) && lat < 10) begin
      @(negedge clk); lat++;
    end
    r = rsp;
  endtask

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sc_rsp_t r; int lat;
    repeat (3) @(negedge clk); rst = 1'b0;
    // single-piece cell 0
    rd(0, r, lat); chk(r.dataready && r.data == 32'h0000_0000 && lat == 2, $sformatf("cell0 first (lat %0d)", lat));
    rd(0, r, lat); chk(r.dataready && r.data == 32'h0000_0001, "cell0 second pops again");
    // two pieces, cell 1
    rd(1, r, lat); chk(r.dataready && r.data == 32'h0001_0000, "cell1 low piece");
    rd(1, r, lat); chk(r.dataready && r.data == 32'hB000_0001 && lat == 1, "cell1 high piece, no pop");
    chk(seq[1] == 1, "cell1 popped once");
    rd(1, r, lat); chk(r.dataready && r.data == 32'h0001_0001 && lat == 2, "cell1 next packet");
    // another address in between drops the kept half
    rd(2, r, lat); chk(r.dataready && r.data == 32'h0002_0000, "cell2");
    rd(1, r, lat); chk(r.dataready && r.data == 32'h0001_0002, "kept half dropped");
    // three pieces, cell 3
    rd(3, r, lat); chk(r.data == 32'h0003_0000, "cell3 piece 0");
    rd(3, r, lat); chk(r.data == 32'hB000_0003, "cell3 piece 1");
    rd(3, r, lat); chk(r.data == 32'hC000_0003, "cell3 piece 2");
    rd(3, r, lat); chk(r.data == 32'h0003_0001, "cell3 next packet");
    // empty cell
    empty[2] = 1'b1;
    rd(2, r, lat); chk(r.no_more_data && !r.dataready, "no more data");
    // out of range
    rd(N, r, lat); chk(r.unknown_addr && lat == 1, "unknown address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
