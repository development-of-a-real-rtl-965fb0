// tb_demon_fifo - self-checking test of the FIFO storage, both modes.
// A cycle-by-cycle queue model (pop on real read, fake read when the count
// reaches depth - log2(depth) in ringbuffer mode without a real read,
// drop writes when full in standard mode) predicts count, data, the
// t1/t2 flags, dropped writes and "no more data".
module tb_demon_fifo;
  localparam int W = 16, D = 32, LIMIT = D - $clog2(D);
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, ring_mode = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic rd_valid, no_more_data, t1, t2, dropped, empty, full;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  int n_t1 = 0, n_drop = 0;

  demon_fifo #(.WIDTH(W), .DEPTH(D), .RINGBUF(1'b1)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] q[$];
  bit exp_valid, exp_nomore, exp_t2, exp_drop;
  logic [W-1:0] exp_data;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // drive one cycle: inputs set at negedge, model advanced, outputs checked
  task automatic cycle(input bit wr, input logic [W-1:0] d, input bit rd);
    bit fake, pop, push;
    wr_en = wr; wr_data = d; rd_en = rd;
    fake = ring_mode && !rd && (q.size() >= LIMIT);
    #1 chk(t1 == fake, "t1 flag");
    pop  = (rd && q.size() > 0) || fake;
    push = wr && (q.size() < D || pop);
    exp_valid  = rd && q.size() > 0;
    exp_nomore = rd && q.size() == 0;
    exp_t2     = fake;
    exp_drop   = wr && !push;
    if (pop) exp_data = q.pop_front();
    if (push) q.push_back(d);
    if (fake) n_t1++;
    @(negedge clk);
    chk(rd_valid == exp_valid, "rd_valid");
    chk(no_more_data == exp_nomore, "no_more_data");
    chk(t2 == exp_t2, "t2 follows t1");
    chk(dropped == exp_drop, "dropped");
    if (exp_drop) n_drop++;
    if (exp_valid) chk(rd_data == exp_data, $sformatf("data %h exp %h", rd_data, exp_data));
    chk(count == ($clog2(D)+1)'(q.size()), "count");
  endtask

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int maxcnt = 0;
    repeat (3) @(negedge clk); rst = 1'b0;
    // standard mode: overfill, then drain past empty
    for (int i = 0; i < 40; i++) cycle(1, W'(i), 0);
    chk(full, "full after overfill");
    for (int i = 0; i < 34; i++) cycle(0, 0, 1);
    chk(empty, "empty after drain");
    // ringbuffer mode: write every cycle, never fills
    ring_mode = 1'b1;
    for (int i = 0; i < 100; i++) begin
      cycle(1, W'(1000 + i), 0);
      if (count > maxcnt) maxcnt = count;
    end
    chk(maxcnt <= LIMIT && !full, $sformatf("ringbuffer never fills (max %0d)", maxcnt));
    // real reads interleaved with writes and fake reads
    for (int i = 0; i < 60; i++) cycle(1, W'(2000 + i), (i % 3) == 0);
    // clear
    clear = 1'b1; @(negedge clk); clear = 1'b0; q.delete();
    chk(empty, "clear empties");
    for (int i = 0; i < 5; i++) cycle(1, W'(3000 + i), 0);
    for (int i = 0; i < 6; i++) cycle(0, 0, 1);
    chk(n_t1 > 50, $sformatf("fake reads seen: %0d", n_t1));
    chk(n_drop == 8, $sformatf("dropped writes: %0d", n_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
