// demon_setup_pkg - the monitoring setup of one chip (the "configuration file").
//
// Every chip carrying DEMON is built from one source; what differs between
// chips is only this package: how many FIFO and register cells exist, how
// wide the two input ports are split, and the properties of every cell.
// The monitoring unit generates its cells from these constants and the ROM
// publishes them, so software can rebuild the setup by reading the ROM.
//
// The global numbers follow the example setup of the design description:
// 8 FIFOs on a 32-bit FIFO bus, 12 registers on a 64-bit register bus and
// 4-bit configuration cells.  FIFO 1 is the example FIFO given there
// (32x2048 ringbuffer BRAM FIFO, frequency 1, trigger timer with resolution 3,
// 4-bit timestamp, 26-bit data, 2-bit event number).  The remaining cells,
// their frequencies and timer choices, the register widths and the initial
// configuration values are a representative mix chosen by this
// implementation from the FIFO catalogue.
package demon_setup_pkg;
  import demon_pkg::*;

  localparam int FIFO_NUM       = 8;
  localparam int FIFO_BUS_WIDTH = 32;
  localparam int REG_NUM        = 12;
  localparam int REG_BUS_WIDTH  = 64;
  localparam int CFG_SIZE       = 4;

  // FIFO cells: type, frequency, timer, resolution, time/data/event size
  function automatic fifo_cfg_arr_t fifo_setup();
    fifo_cfg_arr_t f = '0;
    f[0] = mk_fifo(FT_BRAM32x2048 | FT_RING, 1, TIMER_TRIGGER, 3, 4, 26, 2);
    f[1] = mk_fifo(FT_BRAM32x512  | FT_RING, 0, TIMER_LOCAL,   0, 4, 26, 2);
    f[2] = mk_fifo(FT_BRAM32x1024 | FT_RING, 4, TIMER_GLOBAL,  4, 4, 26, 2);
    f[3] = mk_fifo(FT_BRAM32x512,            1, TIMER_LOCAL,   1, 6, 24, 2);
    f[4] = mk_fifo(FT_BRAM16x1024 | FT_RING, 3, TIMER_TRIGGER, 3, 4, 10, 2);
    f[5] = mk_fifo(FT_BRAM16x2048,           0, TIMER_NONE,    0, 0, 16, 0);
    f[6] = mk_fifo(FT_LUT32x16    | FT_RING, 1, TIMER_LOCAL,   1, 8, 24, 0);
    f[7] = mk_fifo(FT_LUT32x32,              0, TIMER_GLOBAL,  0, 4, 26, 2);
    return f;
  endfunction

  // register cells: width, control bits
  function automatic reg_cfg_arr_t reg_setup();
    reg_cfg_arr_t r = '0;
    for (int j = 0; j < 8; j++) r[j] = mk_reg(64, 0);
    r[8]  = mk_reg(28, 4);
    r[9]  = mk_reg(28, 4);
    r[10] = mk_reg(16, 2);
    r[11] = mk_reg(12, 4);
    return r;
  endfunction

  // initial configuration-cell contents: ringbuffer mode on where available
  function automatic cfg_init_arr_t cfg_setup();
    cfg_init_arr_t c = '0;
    c[0] = 32'h2; c[1] = 32'h2; c[2] = 32'h2; c[4] = 32'h2; c[6] = 32'h2;
    return c;
  endfunction

  localparam fifo_cfg_arr_t FIFO_CFG = fifo_setup();
  localparam reg_cfg_arr_t  REG_CFG  = reg_setup();
  localparam cfg_init_arr_t CFG_INIT = cfg_setup();

endpackage
