// setup_runner - drives one monitoring unit of a given setup through the
// standard operation: let all FIFOs fill for FILL cycles, halt them through
// their configuration cells, drain every FIFO over the slow-control port
// (reassembling words of two or three 32-bit pieces) and read every
// register.  FIFO segment i carries a cycle counter plus i*2^20, so the
// spacing of consecutive packets must equal 2^frequency (modulo the data
// field width); the control bits must equal the cell's control-port value;
// ringbuffer FIFOs must hold at most depth - log2(depth) packets and
// standard FIFOs at most depth (exactly depth once FILL is long enough).
// Used by tb_demon_setups; reports its own check and failure counts.
module setup_runner
  import demon_pkg::*;
#(
  parameter string                     NAME           = "setup",
  parameter int                        FIFO_NUM       = 4,
  parameter int                        FIFO_BUS_WIDTH = 32,
  parameter int                        REG_NUM        = 4,
  parameter int                        REG_BUS_WIDTH  = 32,
  parameter fifo_cfg_arr_t             FIFO_CFG       = '0,
  parameter reg_cfg_arr_t              REG_CFG        = '0,
  parameter cfg_init_arr_t             CFG_INIT       = '0,
  parameter int                        FILL           = 3000
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   fake_reads,
  output int   drops
);

  logic [FIFO_NUM*FIFO_BUS_WIDTH-1:0] fifo_data_in;
  logic [REG_NUM*REG_BUS_WIDTH-1:0]   reg_data_in;
  logic [FIFO_NUM*4-1:0] ctrl_in;
  logic [REG_NUM*4-1:0]  reg_ctrl_in;
  logic [31:0] gt, lt, tt;
  logic [15:0] ev;
  sc_req_t sc_req = '0;
  sc_rsp_t sc_rsp;
  longint cyc = 0;

  monitoring_unit #(
    .FIFO_NUM(FIFO_NUM), .FIFO_BUS_WIDTH(FIFO_BUS_WIDTH), .REG_NUM(REG_NUM),
    .REG_BUS_WIDTH(REG_BUS_WIDTH), .CFG_SIZE(4), .FIFO_CFG(FIFO_CFG),
    .REG_CFG(REG_CFG), .CFG_INIT(CFG_INIT)
  ) dut (
    .clk(clk), .rst(rst), .fifo_data_in(fifo_data_in), .reg_data_in(reg_data_in),
    .ctrl_in(ctrl_in), .reg_ctrl_in(reg_ctrl_in), .global_time_in(gt),
    .local_time_in(lt), .trigger_time_in(tt), .event_number_in(ev),
    .sc_req(sc_req), .sc_rsp(sc_rsp)
  );

  always_ff @(posedge clk) cyc <= cyc + 1;

  always_comb begin
    for (int i = 0; i < FIFO_NUM; i++) begin
      fifo_data_in[i*FIFO_BUS_WIDTH +: FIFO_BUS_WIDTH] = FIFO_BUS_WIDTH'(cyc + (longint'(i) << 20));
      ctrl_in[i*4 +: 4] = 4'(i + 3);
    end
    for (int j = 0; j < REG_NUM; j++) begin
      reg_data_in[j*REG_BUS_WIDTH +: REG_BUS_WIDTH] = REG_BUS_WIDTH'({32'(cyc), 32'(j)});
      reg_ctrl_in[j*4 +: 4] = 4'(j);
    end
  end
  assign gt = 32'(cyc);
  assign lt = 32'(cyc * 5);
  assign tt = 32'(cyc % 300);
  assign ev = 16'(cyc / 300);

  // count ringbuffer fake reads and standard-mode drops of all cells
  for (genvar i = 0; i < FIFO_NUM; i++) begin : g_mon
    always @(posedge clk) begin
      if (dut.gen_fifo[i].u_cell.fake_read) fake_reads++;
      if (dut.gen_fifo[i].u_cell.dropped)   drops++;
    end
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL [%s] %s", NAME, what); end
  endtask

  task automatic sc(input bit wr, input logic [15:0] addr, input logic [31:0] data,
                    output sc_rsp_t r);
    int w = 0;
    @(negedge clk);
    sc_req.read = !wr; sc_req.write = wr; sc_req.addr = addr; sc_req.data = data;
    @(negedge clk);
    sc_req = '0;
    while (!(sc_rsp.dataready || sc_rsp.no_more_data || sc_rsp.write_ack || sc_rsp.unknown_addr)
           && w < 20) begin
      @(negedge clk); w++;
    end
    r = sc_rsp;
    chk(w < 20, "response arrives");
  endtask

  initial begin
    sc_rsp_t r;
    done = 1'b0; checks = 0; failures = 0; fake_reads = 0; drops = 0;
    @(negedge clk);
    while (rst) @(negedge clk);
    repeat (FILL) @(negedge clk);
    for (int i = 0; i < FIFO_NUM; i++) begin
      sc(1, 16'h1800 + 16'(i), CFG_INIT[i] | 32'h8, r);
      chk(r.write_ack, "halt acknowledged");
    end
    repeat (4) @(negedge clk);
    for (int i = 0; i < FIFO_NUM; i++) begin
      automatic fifo_cfg_t c = FIFO_CFG[i];
      automatic int ds = int'(c.data_size), w = int'(c.width), cb = int'(c.ctrl_bits);
      automatic int np = n_words(w + cb), n = 0, depth = int'(c.depth);
      automatic longint prev = -1, d;
      automatic logic [95:0] word;
      forever begin
        sc(0, 16'h2000 + 16'(i), 0, r);
        if (!r.dataready) break;
        word = 96'(r.data);
        for (int p = 1; p < np; p++) begin
          sc(0, 16'h2000 + 16'(i), 0, r);
          chk(r.dataready, "further piece");
          word[32*p +: 32] = r.data;
        end
        d = longint'(word & ((96'd1 << ds) - 1));
        if (prev >= 0)
          chk(((d - prev) & ((longint'(1) << ds) - 1)) == (longint'(1) << int'(c.frequency)),
              $sformatf("fifo %0d spacing %0d", i, d - prev));
        if (cb > 0)
          chk(int'((word >> w) & ((96'd1 << cb) - 1)) == ((i + 3) & ((1 << cb) - 1)),
              $sformatf("fifo %0d control bits", i));
        prev = d;
        n++;
      end
      chk(n > 0, $sformatf("fifo %0d had data", i));
      if (c.ftype[7] && CFG_INIT[i][CFG_BIT_RING])
        chk(n <= depth - $clog2(depth), $sformatf("fifo %0d ringbuffer bound (%0d)", i, n));
      else if (longint'(FILL) >> int'(c.frequency) > depth)
        chk(n == depth, $sformatf("fifo %0d standard full (%0d)", i, n));
      else
        chk(n <= depth, $sformatf("fifo %0d standard bound (%0d)", i, n));
    end
    for (int j = 0; j < REG_NUM; j++) begin
      automatic int wj = int'(REG_CFG[j].width), cj = int'(REG_CFG[j].ctrl_bits);
      automatic logic [95:0] word;
      sc(0, 16'h3000 + 16'(j), 0, r);
      chk(r.dataready, "register read");
      word = 96'(r.data);
      for (int p = 1; p < n_words(wj + cj); p++) begin
        sc(0, 16'h3000 + 16'(j), 0, r);
        word[32*p +: 32] = r.data;
      end
      chk(word[31:0] == 32'(j) & 32'((64'd1 << wj) - 1), $sformatf("register %0d low word", j));
    end
    done = 1'b1;
  end

endmodule
