// demon_pkg - types and constants shared by the DEMON monitoring blocks.
//
// DEMON buffers raw monitoring signals of an FPGA in FIFO and register cells
// and lets them be read over the TRBnet slow-control channel.  This package
// holds what all blocks agree on:
//   * the slow-control request/response bundle (RegIO side), 32-bit data,
//     16-bit cell address, with the four handshakes named for RegIO:
//     dataready, no more data, write acknowledge and unknown address;
//   * the address segments of the monitoring unit (ROM 0x1000, configuration
//     cells 0x1800, FIFO cells 0x2000, register cells 0x3000);
//   * the meaning of the configuration-cell bits (reset, ringbuffer mode,
//     input validation, halt);
//   * the FIFO type codes of the predefined FIFO catalogue (BRAM and LUT
//     FIFOs, each in a standard and a ringbuffer variant) and the record that
//     describes one FIFO or register cell, mirroring the configuration file.
// Numeric type codes and the bit positions inside the records are choices of
// this implementation; the catalogue itself, the address map and the
// configuration-bit functions follow the design description.
package demon_pkg;

  // ---------------------------------------------------------------- limits
  localparam int FIFO_MAX     = 20;   // at most 20 FIFO cells
  localparam int REG_MAX      = 32;   // at most 32 register cells
  localparam int ROM_DEPTH    = 112;  // 4 words per FIFO + 1 per register
  localparam int MAX_CTRL     = 8;    // widest control-bit field (64-bit BRAM)
  localparam int CTRL_PORT_W  = 4;    // control-port bits per cell
  localparam int TIMER_W      = 32;   // width of every timer input
  localparam int EVENT_W      = 16;   // width of the TRBnet event number
  localparam int SC_DATA_W    = 32;   // slow-control data word

  // ---------------------------------------------------------- slow control
  typedef struct packed {
    logic        read;    // one-cycle read strobe
    logic        write;   // one-cycle write strobe
    logic [15:0] addr;    // cell address
    logic [31:0] data;    // write data
  } sc_req_t;

  typedef struct packed {
    logic [31:0] data;          // read data, valid with dataready
    logic        dataready;     // read answered with data
    logic        no_more_data;  // read of an empty FIFO
    logic        write_ack;     // write accepted
    logic        unknown_addr;  // address not served / access not allowed
  } sc_rsp_t;

  localparam sc_rsp_t SC_RSP_IDLE = '0;

  // address segments (upper address byte) -------------------------------
  localparam logic [7:0] SEG_ROM  = 8'h10;
  localparam logic [7:0] SEG_CFG  = 8'h18;
  localparam logic [7:0] SEG_FIFO = 8'h20;
  localparam logic [7:0] SEG_REG  = 8'h30;

  // ------------------------------------------------- configuration cell bits
  localparam int CFG_BIT_RESET    = 0;  // clear the FIFO (self-clearing)
  localparam int CFG_BIT_RING     = 1;  // ringbuffer mode
  localparam int CFG_BIT_VALIDATE = 2;  // store only changed values
  localparam int CFG_BIT_HALT     = 3;  // block FIFO writes

  // ----------------------------------------------------- timer type codes
  localparam logic [7:0] TIMER_NONE    = 8'd0;
  localparam logic [7:0] TIMER_GLOBAL  = 8'd1;
  localparam logic [7:0] TIMER_LOCAL   = 8'd2;  // system timer
  localparam logic [7:0] TIMER_TRIGGER = 8'd3;

  // ------------------------------------------------------ FIFO catalogue
  // Low bits: catalogue row; bit 7: ringbuffer-capable variant.
  localparam logic [7:0] FT_NULL        = 8'h00;
  localparam logic [7:0] FT_BRAM16x1024 = 8'h01;
  localparam logic [7:0] FT_BRAM16x2048 = 8'h02;
  localparam logic [7:0] FT_BRAM16x4096 = 8'h03;
  localparam logic [7:0] FT_BRAM32x512  = 8'h04;
  localparam logic [7:0] FT_BRAM32x1024 = 8'h05;
  localparam logic [7:0] FT_BRAM32x2048 = 8'h06;
  localparam logic [7:0] FT_BRAM64x512  = 8'h07;
  localparam logic [7:0] FT_BRAM64x1024 = 8'h08;
  localparam logic [7:0] FT_LUT8x16     = 8'h09;
  localparam logic [7:0] FT_LUT8x32     = 8'h0A;
  localparam logic [7:0] FT_LUT16x16    = 8'h0B;
  localparam logic [7:0] FT_LUT16x32    = 8'h0C;
  localparam logic [7:0] FT_LUT32x16    = 8'h0D;
  localparam logic [7:0] FT_LUT32x32    = 8'h0E;
  localparam logic [7:0] FT_LUT64x16    = 8'h0F;
  localparam logic [7:0] FT_LUT64x32    = 8'h10;
  localparam logic [7:0] FT_RING        = 8'h80;  // OR into a code

  // one FIFO cell, as listed in the configuration file
  typedef struct packed {
    logic [7:0]  ftype;       // catalogue code, FT_NULL ends the list
    logic [15:0] width;       // packet width = data + time + event size
    logic [15:0] depth;       // packets
    logic [7:0]  log_depth;   // log2(depth)
    logic [7:0]  ctrl_bits;   // control bits stored beside each packet
    logic [7:0]  frequency;   // write every 2**frequency cycles
    logic [7:0]  timer_type;  // TIMER_*
    logic [7:0]  timer_res;   // lowest timer bit used as timestamp
    logic [7:0]  time_size;   // timestamp bits in the packet
    logic [7:0]  data_size;   // raw data bits in the packet
    logic [7:0]  event_size;  // event-number bits in the packet
  } fifo_cfg_t;

  // one register cell
  typedef struct packed {
    logic [15:0] width;       // 0 ends the list
    logic [7:0]  ctrl_bits;
  } reg_cfg_t;

  typedef fifo_cfg_t   [FIFO_MAX-1:0]       fifo_cfg_arr_t;
  typedef reg_cfg_t    [REG_MAX-1:0]        reg_cfg_arr_t;
  typedef logic        [FIFO_MAX-1:0][31:0] cfg_init_arr_t;

  function automatic int ft_width(logic [7:0] t);
    case (t[6:0])
      7'h01, 7'h02, 7'h03, 7'h0B, 7'h0C: return 16;
      7'h04, 7'h05, 7'h06, 7'h0D, 7'h0E: return 32;
      7'h07, 7'h08, 7'h0F, 7'h10:        return 64;
      7'h09, 7'h0A:                      return 8;
      default:                           return 0;
    endcase
  endfunction

  function automatic int ft_depth(logic [7:0] t);
    case (t[6:0])
      7'h01, 7'h05, 7'h08: return 1024;
      7'h02, 7'h06:        return 2048;
      7'h03:               return 4096;
      7'h04, 7'h07:        return 512;
      7'h09, 7'h0B, 7'h0D, 7'h0F: return 16;
      7'h0A, 7'h0C, 7'h0E, 7'h10: return 32;
      default:             return 0;
    endcase
  endfunction

  // control bits come free with block RAM parity bits; LUT FIFOs have none
  function automatic int ft_ctrl_bits(logic [7:0] t);
    case (t[6:0])
      7'h01, 7'h02, 7'h03: return 2;
      7'h04, 7'h05, 7'h06: return 4;
      7'h07, 7'h08:        return 8;
      default:             return 0;
    endcase
  endfunction

  function automatic fifo_cfg_t mk_fifo(logic [7:0] t, int freq, logic [7:0] timer,
                                        int tres, int tsize, int dsize, int esize);
    fifo_cfg_t c;
    c.ftype      = t;
    c.width      = 16'(ft_width(t));
    c.depth      = 16'(ft_depth(t));
    c.log_depth  = 8'($clog2(ft_depth(t)));
    c.ctrl_bits  = 8'(ft_ctrl_bits(t));
    c.frequency  = 8'(freq);
    c.timer_type = timer;
    c.timer_res  = 8'(tres);
    c.time_size  = 8'(tsize);
    c.data_size  = 8'(dsize);
    c.event_size = 8'(esize);
    return c;
  endfunction

  function automatic reg_cfg_t mk_reg(int width, int ctrl);
    reg_cfg_t r;
    r.width     = 16'(width);
    r.ctrl_bits = 8'(ctrl);
    return r;
  endfunction

  // number of 32-bit slow-control reads needed for a cell word
  function automatic int n_words(int bits);
    return (bits + SC_DATA_W - 1) / SC_DATA_W;
  endfunction

endpackage
