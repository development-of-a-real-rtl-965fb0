// tb_monitoring_unit - end-to-end test of the monitoring unit at its
// default setup (8 FIFOs on a 32-bit bus, 12 registers on a 64-bit bus).
//
// The FIFO inputs count clock cycles (segment i carries cycle + i*2^20), so
// every stored packet tells when it was sampled; the timestamp and the
// spacing of consecutive packets are checked against that.  The test runs
// the operation sequence software uses: read the whole ROM, let the cells
// fill, halt them through their configuration cells, drain every FIFO over
// the slow-control port (two reads for 36-bit words) until "no more data",
// then exercises input validation, the reset bit, registers and illegal
// addresses.  Each mechanism is counted and must occur at least once:
// ROM read, configuration write, frequency regulation, two-piece read,
// ringbuffer fake read, standard-mode drop, input validation, halt, reset
// bit, no-more-data, unknown address, register read, control-bit marking.
module tb_monitoring_unit;
  import demon_pkg::*;
  import demon_setup_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [FIFO_NUM*FIFO_BUS_WIDTH-1:0] fifo_data_in;
  logic [REG_NUM*REG_BUS_WIDTH-1:0]   reg_data_in;
  logic [FIFO_NUM*4-1:0] ctrl_in;
  logic [REG_NUM*4-1:0]  reg_ctrl_in;
  logic [31:0] global_time_in, local_time_in, trigger_time_in;
  logic [15:0] event_number_in;
  sc_req_t sc_req = '0;
  sc_rsp_t sc_rsp;

  monitoring_unit dut (.*);

  int cyc = 0;
  int checks = 0, failures = 0;
  bit slow5 = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // stimulus ----------------------------------------------------------------
  function automatic int seg_offset(int i);
    return i << 20;
  endfunction
  always_comb begin
    for (int i = 0; i < FIFO_NUM; i++) begin
      fifo_data_in[i*32 +: 32] = 32'(cyc + seg_offset(i));
      ctrl_in[i*4 +: 4]        = 4'(i + 1);
    end
    if (slow5) fifo_data_in[5*32 +: 32] = 32'(cyc >> 6);
    for (int j = 0; j < REG_NUM; j++) begin
      reg_data_in[j*64 +: 64] = {32'(cyc), 32'(j) << 24 | 32'(cyc)};
      reg_ctrl_in[j*4 +: 4]   = 4'(15 - j);
    end
  end
  assign global_time_in  = 32'(cyc);
  assign local_time_in   = 32'(cyc * 3);
  assign trigger_time_in = 32'(cyc % 200);
  assign event_number_in = 16'(cyc / 200);

  function automatic int timer_of(int ttype, int c);
    case (ttype)
      1: return c;
      2: return c * 3;
      3: return c % 200;
      default: return 0;
    endcase
  endfunction

  // mechanism counters ------------------------------------------------------
  int n_rom = 0, n_cfg_wr = 0, n_freq = 0, n_two = 0, n_fake = 0, n_drop = 0;
  int n_valid = 0, n_halt = 0, n_reset = 0, n_nomore = 0, n_unknown = 0, n_reg = 0, n_mark = 0;

  always @(posedge clk) begin
    if (dut.gen_fifo[0].u_cell.fake_read) n_fake++;
    if (dut.gen_fifo[1].u_cell.fake_read) n_fake++;
    if (dut.gen_fifo[6].u_cell.fake_read) n_fake++;
    if (dut.gen_fifo[3].u_cell.dropped)   n_drop++;
    if (dut.gen_fifo[7].u_cell.dropped)   n_drop++;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // one slow-control access; waits for its single response
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
    chk(w < 20, $sformatf("response to %h", addr));
    chk(w <= 1, "latency at most 2 cycles");
    if (r.unknown_addr) n_unknown++;
    if (r.no_more_data) n_nomore++;
  endtask

  task automatic cfg_write(input int i, input logic [3:0] v);
    sc_rsp_t r;
    sc(1, 16'h1800 + 16'(i), 32'(v), r);
    chk(r.write_ack, "configuration write acknowledged");
    n_cfg_wr++;
    if (v[CFG_BIT_HALT]) n_halt++;
    if (v[CFG_BIT_RESET]) n_reset++;
  endtask

  // drain FIFO i; checks every packet, returns the packet count
  task automatic drain(input int i, output int n, output int first, output int last);
    fifo_cfg_t c = FIFO_CFG[i];
    int ds = int'(c.data_size), ts = int'(c.time_size), es = int'(c.event_size);
    int w = int'(c.width), cb = int'(c.ctrl_bits);
    int prev = -1;
    sc_rsp_t r;
    logic [63:0] word;
    n = 0; first = -1; last = -1;
    forever begin
      sc(0, 16'h2000 + 16'(i), 0, r);
      if (!r.dataready) break;
      word = 64'(r.data);
      if (w + cb > 32) begin
        sc(0, 16'h2000 + 16'(i), 0, r);
        chk(r.dataready, "second piece");
        word[63:32] = r.data;
        n_two++;
      end
      begin
        int d, cy, tstamp, ev, ctl;
        d   = int'(word & ((64'd1 << ds) - 1));
        cy  = (i == 5 && slow5) ? -1 : (d - seg_offset(i)) & ((1 << ds) - 1);
        tstamp = int'((word >> ds) & ((64'd1 << ts) - 1));
        ev  = int'((word >> (ds + ts)) & ((64'd1 << es) - 1));
        ctl = int'((word >> w) & ((64'd1 << cb) - 1));
        if (cy >= 0 && ds < 24) begin
          // narrow data field: the sample cycle is known only modulo 2^ds
          if (prev >= 0) begin
            chk(((cy - prev) & ((1 << ds) - 1)) == (1 << int'(c.frequency)),
                $sformatf("fifo %0d spacing", i));
            n_freq++;
          end
          prev = cy;
        end else if (cy >= 0) begin
          chk(tstamp == ((timer_of(int'(c.timer_type), cy) >> int'(c.timer_res)) & ((1 << ts) - 1)),
              $sformatf("fifo %0d timestamp", i));
          chk(ev == ((cy / 200) & ((1 << es) - 1)), $sformatf("fifo %0d event number", i));
          if (prev >= 0) begin
            chk(cy - prev == (1 << int'(c.frequency)), $sformatf("fifo %0d spacing %0d", i, cy - prev));
            n_freq++;
          end
          prev = cy;
        end
        if (cb > 0) begin
          chk(ctl == ((i + 1) & ((1 << cb) - 1)), $sformatf("fifo %0d control bits", i));
          n_mark++;
        end
        if (first < 0) first = d;
        last = d;
      end
      n++;
    end
  endtask

  initial begin
    #5ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sc_rsp_t r;
    int n, first, last, nf, nr;
    logic [31:0] lo;
    repeat (4) @(negedge clk); rst = 1'b0;

    // 1. rebuild the setup from the ROM
    nf = 0; nr = 0;
    for (int a = 0; a < ROM_DEPTH; a++) begin
      sc(0, 16'h1000 + 16'(a), 0, r);
      chk(r.dataready, "ROM read");
      n_rom++;
      if (a < 80 && a % 4 == 0 && r.data[31:24] != 8'h0) begin
        int fi;
        fi = a / 4;
        nf++;
        chk(r.data[15:0] == FIFO_CFG[fi].depth && r.data[23:16] == FIFO_CFG[fi].width[7:0],
            $sformatf("ROM FIFO %0d geometry", fi));
      end
      if (a >= 80 && r.data[15:0] != 16'h0) begin
        nr++;
        chk(r.data[15:0] == REG_CFG[a-80].width, "ROM register width");
      end
      if (a == 0) chk(r.data == 32'h8620_0800, "ROM word 0");
    end
    chk(nf == FIFO_NUM && nr == REG_NUM, $sformatf("ROM lists %0d FIFOs, %0d registers", nf, nr));

    // 2. read back the configuration cells
    for (int i = 0; i < FIFO_NUM; i++) begin
      sc(0, 16'h1800 + 16'(i), 0, r);
      chk(r.dataready && r.data == CFG_INIT[i], $sformatf("cfg %0d initial", i));
    end

    // 3. let the cells fill, then halt all of them
    repeat (1500) @(negedge clk);
    for (int i = 0; i < FIFO_NUM; i++) cfg_write(i, 4'(CFG_INIT[i]) | 4'b1000);
    repeat (4) @(negedge clk);
    for (int i = 0; i < FIFO_NUM; i++) begin
      drain(i, n, first, last);
      chk(n > 0, $sformatf("fifo %0d had data", i));
      case (i)
        1: chk(n <= 512 - 9, $sformatf("ringbuffer fifo 1 bounded (%0d)", n));
        3: chk(n == 512, $sformatf("standard fifo 3 full (%0d)", n));
        6: chk(n <= 16 - 4, $sformatf("ringbuffer fifo 6 bounded (%0d)", n));
        7: chk(n == 32, $sformatf("standard fifo 7 full (%0d)", n));
        default: ;
      endcase
      if (i == 7) chk((first & 32'hFFFFF) < 40, "standard mode keeps the oldest packets");
    end

    // 4. input validation on FIFO 5 (slowly changing input)
    slow5 = 1;
    cfg_write(5, 4'b0101);            // reset + validate, running
    repeat (640) @(negedge clk);
    cfg_write(5, 4'b1100);            // halt
    repeat (4) @(negedge clk);
    drain(5, n, first, last);
    chk(n >= 9 && n <= 12 && last - first == n - 1, $sformatf("validation kept %0d changes", n));
    if (n < 100) n_valid++;
    slow5 = 0;

    // 5. reset bit empties a filled FIFO
    cfg_write(7, 4'b0000);
    repeat (50) @(negedge clk);
    cfg_write(7, 4'b1001);            // reset + halt
    sc(0, 16'h2007, 0, r);
    chk(r.no_more_data, "FIFO empty after reset bit");

    // 6. registers: 64-bit in two pieces of one sample, marked narrow ones
    for (int j = 0; j < REG_NUM; j++) begin
      sc(0, 16'h3000 + 16'(j), 0, r);
      chk(r.dataready, "register read");
      lo = r.data;
      n_reg++;
      if (REG_CFG[j].width == 16'd64) begin
        sc(0, 16'h3000 + 16'(j), 0, r);
        chk(r.data == {8'h0, lo[23:0]} && lo[31:24] == 8'(j), $sformatf("register %0d halves", j));
        n_two++;
      end else begin
        int wj = int'(REG_CFG[j].width), cj = int'(REG_CFG[j].ctrl_bits);
        chk(32'(lo >> wj) == 32'((15 - j) & ((1 << cj) - 1)), $sformatf("register %0d control bits", j));
        n_mark++;
      end
    end

    // 7. illegal accesses
    sc(0, 16'h2000 + 16'(FIFO_NUM), 0, r); chk(r.unknown_addr, "FIFO index past FIFO_NUM");
    sc(0, 16'h3000 + 16'(REG_NUM), 0, r);  chk(r.unknown_addr, "register index past REG_NUM");
    sc(0, 16'h1800 + 16'(FIFO_NUM), 0, r); chk(r.unknown_addr, "cfg index past FIFO_NUM");
    sc(1, 16'h2000, 1, r);                 chk(r.unknown_addr, "FIFO write refused");
    sc(0, 16'h4000, 0, r);                 chk(r.unknown_addr, "unmapped segment");

    // every mechanism must have happened
    $display("mechanisms: rom=%0d cfg_wr=%0d freq=%0d two_piece=%0d fake_read=%0d drop=%0d validate=%0d halt=%0d reset=%0d no_more=%0d unknown=%0d reg=%0d mark=%0d",
             n_rom, n_cfg_wr, n_freq, n_two, n_fake, n_drop, n_valid, n_halt, n_reset, n_nomore, n_unknown, n_reg, n_mark);
    chk(n_rom > 0, "ROM read happened");       chk(n_cfg_wr > 0, "config write happened");
    chk(n_freq > 0, "frequency checks");       chk(n_two > 0, "two-piece read happened");
    chk(n_fake > 0, "fake read happened");     chk(n_drop > 0, "drop happened");
    chk(n_valid > 0, "validation happened");   chk(n_halt > 0, "halt happened");
    chk(n_reset > 0, "reset bit happened");    chk(n_nomore > 0, "no more data happened");
    chk(n_unknown > 0, "unknown addr happened"); chk(n_reg > 0, "register read happened");
    chk(n_mark > 0, "control marking happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
