// tb_demon_setups - runs the monitoring setups of the resource study and of
// the FIFO bring-up tests side by side, each in its own monitoring unit:
//   mixed4   : 32x16 LUT, 32x32 LUT, 32x512, 32x1024 BRAM (ringbuffer), 4x32-bit registers
//   bram4    : 32x512, 32x1024, 32x2048, 16x4096 BRAM, 4x32-bit registers
//   bram12   : 6x 32x512, 3x 32x1024, 3x 32x2048 BRAM, 4x32-bit registers
//   lut12    : 6x 32x16, 6x 32x32 LUT (ringbuffer), 4x32-bit registers
//   regs16x64: 4x 32x512 BRAM, 16x64-bit registers
//   bus64    : 64-bit FIFO bus with 64x512 and 64x1024 BRAM FIFOs at the
//              highest and a high frequency (three-piece reads)
// Every setup must pass its own checks, and fake reads and drops must occur.
module tb_demon_setups;
  import demon_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  function automatic cfg_init_arr_t rings(int n);
    cfg_init_arr_t c = '0;
    for (int i = 0; i < n; i++) c[i] = 32'h2;
    return c;
  endfunction

  function automatic reg_cfg_arr_t regs(int n, int w);
    reg_cfg_arr_t r = '0;
    for (int j = 0; j < n; j++) r[j] = mk_reg(w, (w == 64) ? 0 : 2);
    return r;
  endfunction

  function automatic fifo_cfg_arr_t s_mixed4();
    fifo_cfg_arr_t f = '0;
    f[0] = mk_fifo(FT_LUT32x16 | FT_RING,    1, TIMER_LOCAL,   0, 4, 26, 2);
    f[1] = mk_fifo(FT_LUT32x32 | FT_RING,    0, TIMER_GLOBAL,  0, 4, 26, 2);
    f[2] = mk_fifo(FT_BRAM32x512 | FT_RING,  0, TIMER_TRIGGER, 0, 4, 26, 2);
    f[3] = mk_fifo(FT_BRAM32x1024 | FT_RING, 1, TIMER_GLOBAL,  2, 4, 26, 2);
    return f;
  endfunction

  function automatic fifo_cfg_arr_t s_bram4();
    fifo_cfg_arr_t f = '0;
    f[0] = mk_fifo(FT_BRAM32x512  | FT_RING, 0, TIMER_LOCAL,   0, 4, 26, 2);
    f[1] = mk_fifo(FT_BRAM32x1024 | FT_RING, 1, TIMER_GLOBAL,  1, 4, 26, 2);
    f[2] = mk_fifo(FT_BRAM32x2048 | FT_RING, 0, TIMER_TRIGGER, 3, 4, 26, 2);
    f[3] = mk_fifo(FT_BRAM16x4096 | FT_RING, 0, TIMER_NONE,    0, 0, 16, 0);
    return f;
  endfunction

  function automatic fifo_cfg_arr_t s_bram12();
    fifo_cfg_arr_t f = '0;
    for (int i = 0; i < 6; i++)  f[i] = mk_fifo(FT_BRAM32x512  | FT_RING, i % 3, TIMER_LOCAL, 0, 4, 26, 2);
    for (int i = 6; i < 9; i++)  f[i] = mk_fifo(FT_BRAM32x1024 | FT_RING, 1, TIMER_GLOBAL, 0, 4, 26, 2);
    for (int i = 9; i < 12; i++) f[i] = mk_fifo(FT_BRAM32x2048,           4, TIMER_TRIGGER, 0, 4, 26, 2);
    return f;
  endfunction

  function automatic fifo_cfg_arr_t s_lut12();
    fifo_cfg_arr_t f = '0;
    for (int i = 0; i < 6; i++)  f[i] = mk_fifo(FT_LUT32x16 | FT_RING, 0, TIMER_LOCAL, 0, 4, 26, 2);
    for (int i = 6; i < 12; i++) f[i] = mk_fifo(FT_LUT32x32 | FT_RING, 1, TIMER_LOCAL, 0, 4, 26, 2);
    return f;
  endfunction

  function automatic fifo_cfg_arr_t s_regs();
    fifo_cfg_arr_t f = '0;
    for (int i = 0; i < 4; i++) f[i] = mk_fifo(FT_BRAM32x512 | FT_RING, 1, TIMER_LOCAL, 0, 4, 26, 2);
    return f;
  endfunction

  function automatic fifo_cfg_arr_t s_bus64();
    fifo_cfg_arr_t f = '0;
    f[0] = mk_fifo(FT_BRAM64x512  | FT_RING, 0, TIMER_GLOBAL,  0, 8, 52, 4);
    f[1] = mk_fifo(FT_BRAM64x512,            1, TIMER_LOCAL,   0, 8, 52, 4);
    f[2] = mk_fifo(FT_BRAM64x1024 | FT_RING, 1, TIMER_TRIGGER, 2, 8, 52, 4);
    return f;
  endfunction

  localparam int NS = 6;
  logic [NS-1:0] done;
  int ck [NS], fl [NS], fk [NS], dr [NS];

  setup_runner #(.NAME("mixed4"), .FIFO_NUM(4), .REG_NUM(4), .REG_BUS_WIDTH(32),
    .FIFO_CFG(s_mixed4()), .REG_CFG(regs(4, 32)), .CFG_INIT(rings(4)), .FILL(2500))
    u0 (.clk(clk), .rst(rst), .done(done[0]), .checks(ck[0]), .failures(fl[0]), .fake_reads(fk[0]), .drops(dr[0]));
  setup_runner #(.NAME("bram4"), .FIFO_NUM(4), .REG_NUM(4), .REG_BUS_WIDTH(32),
    .FIFO_CFG(s_bram4()), .REG_CFG(regs(4, 32)), .CFG_INIT(rings(4)), .FILL(5000))
    u1 (.clk(clk), .rst(rst), .done(done[1]), .checks(ck[1]), .failures(fl[1]), .fake_reads(fk[1]), .drops(dr[1]));
  setup_runner #(.NAME("bram12"), .FIFO_NUM(12), .REG_NUM(4), .REG_BUS_WIDTH(32),
    .FIFO_CFG(s_bram12()), .REG_CFG(regs(4, 32)), .CFG_INIT(rings(9)), .FILL(3000))
    u2 (.clk(clk), .rst(rst), .done(done[2]), .checks(ck[2]), .failures(fl[2]), .fake_reads(fk[2]), .drops(dr[2]));
  setup_runner #(.NAME("lut12"), .FIFO_NUM(12), .REG_NUM(4), .REG_BUS_WIDTH(32),
    .FIFO_CFG(s_lut12()), .REG_CFG(regs(4, 32)), .CFG_INIT(rings(12)), .FILL(500))
    u3 (.clk(clk), .rst(rst), .done(done[3]), .checks(ck[3]), .failures(fl[3]), .fake_reads(fk[3]), .drops(dr[3]));
  setup_runner #(.NAME("regs16x64"), .FIFO_NUM(4), .REG_NUM(16), .REG_BUS_WIDTH(64),
    .FIFO_CFG(s_regs()), .REG_CFG(regs(16, 64)), .CFG_INIT(rings(4)), .FILL(1500))
    u4 (.clk(clk), .rst(rst), .done(done[4]), .checks(ck[4]), .failures(fl[4]), .fake_reads(fk[4]), .drops(dr[4]));
  setup_runner #(.NAME("bus64"), .FIFO_NUM(3), .FIFO_BUS_WIDTH(64), .REG_NUM(2), .REG_BUS_WIDTH(64),
    .FIFO_CFG(s_bus64()), .REG_CFG(regs(2, 64)), .CFG_INIT(32'h2 | (32'h2 << 64)), .FILL(2500))
    u5 (.clk(clk), .rst(rst), .done(done[5]), .checks(ck[5]), .failures(fl[5]), .fake_reads(fk[5]), .drops(dr[5]));

  int checks = 0, failures = 0;

  initial begin
    #20ms;
    $display("FAIL watchdog, done=%b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    int fake_sum = 0, drop_sum = 0;
    repeat (4) @(negedge clk); rst = 1'b0;
    wait (&done);
    for (int s = 0; s < NS; s++) begin
      checks += ck[s]; failures += fl[s]; fake_sum += fk[s]; drop_sum += dr[s];
      $display("setup %0d: checks=%0d failures=%0d fake_reads=%0d drops=%0d", s, ck[s], fl[s], fk[s], dr[s]);
    end
    checks++; if (fake_sum == 0) begin failures++; $display("FAIL no fake read"); end
    checks++; if (drop_sum == 0) begin failures++; $display("FAIL no drop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
