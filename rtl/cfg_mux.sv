// cfg_mux - multiplexer for the configuration-cell address range (0x1800..).
//
// The low address byte selects configuration cell 0..N-1.  A read returns the
// selected cell, zero-extended to 32 bits; a write drives that cell's write
// strobe in the same cycle and is acknowledged.  An index of N or more is
// answered with unknown_addr.  Interface: req is the already decoded
// slow-control request for this segment, rsp answers it one cycle later
// (one response pulse per request).  The cells themselves live beside their
// FIFOs; this block only routes, as in the design description.
module cfg_mux
  import demon_pkg::*;
#(
  parameter int N        = 8,
  parameter int CFG_SIZE = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  sc_req_t                    req,
  output sc_rsp_t                    rsp,
  input  logic [N-1:0][CFG_SIZE-1:0] cfg,
  output logic [N-1:0]               wr_en,
  output logic [CFG_SIZE-1:0]        wr_data
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;  // bits that index a cell

  logic [7:0] idx;
  logic       hit;

  assign idx     = req.addr[7:0];
  assign hit     = 32'(idx) < N;
  assign wr_data = req.data[CFG_SIZE-1:0];

  always_comb begin
    wr_en = '0;
    if (req.write && hit) wr_en[idx[IW-1:0]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp <= SC_RSP_IDLE;
    end else begin
      rsp <= SC_RSP_IDLE;
      if (req.read || req.write) begin
        if (!hit) begin
          rsp.unknown_addr <= 1'b1;
        end else if (req.read) begin
          rsp.data      <= 32'(cfg[idx]);
          rsp.dataready <= 1'b1;
        end else begin
          rsp.write_ack <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(req.read && req.write))
    else $error("cfg_mux: read and write in the same cycle");

endmodule
