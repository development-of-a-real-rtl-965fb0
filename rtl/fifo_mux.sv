// fifo_mux - multiplexer for the FIFO-cell address range (0x2000..).
//
// The low address byte selects FIFO cell 0..N-1.  A read is passed to that
// cell as a one-cycle read strobe; its answer (data or "no more data") is
// returned on the slow-control response one cycle after the cell answers.
// Words wider than 32 bits (the cell reports how many 32-bit reads it needs)
// are sent in pieces: the first read returns bits 31:0 and keeps the whole
// word; each following read of the same address returns the next 32 bits
// without popping the FIFO again.  A read of any other address drops the
// kept word.  Indices of N or more answer unknown_addr.
//
// Interface: req is the decoded request for this segment (reads only), rsp
// carries one response pulse per request.  Latency: 2 cycles for a FIFO
// read (FIFO read, response register), 1 cycle for a kept piece.
// A new request while one is outstanding is not allowed (asserted).  Uniform
// segment width follows the design description; splitting into up to three
// pieces (for 64-bit packets with control bits) is this implementation's
// extension of its two-read scheme.
module fifo_mux
  import demon_pkg::*;
#(
  parameter int N      = 8,
  parameter int WORD_W = 40
) (
  input  logic                   clk,
  input  logic                   rst,
  input  sc_req_t                req,
  output sc_rsp_t                rsp,
  output logic [N-1:0]           cell_read,
  input  logic [N-1:0][WORD_W-1:0] cell_data,
  input  logic [N-1:0]           cell_ready,
  input  logic [N-1:0]           cell_nomore,
  input  logic [N-1:0][1:0]      cell_nwords
);

  localparam int BUF_W = 3 * SC_DATA_W;
  localparam int IW    = (N > 1) ? $clog2(N) : 1;  // bits that index a cell

  logic [7:0]       idx, cur;
  logic             hit, busy;
  logic             pend;
  logic [7:0]       pend_idx;
  logic [1:0]       pend_word, pend_n;
  logic [BUF_W-1:0] word_buf;
  logic             take_piece, start_read;
  logic [BUF_W-1:0] cur_word;

  assign idx        = req.addr[7:0];
  assign hit        = 32'(idx) < N;
  assign take_piece = req.read && !busy && hit && pend && (pend_idx == idx);
  assign start_read = req.read && !busy && hit && !take_piece;
  assign cur_word   = BUF_W'(cell_data[cur]);

  always_comb begin
    cell_read = '0;
    if (start_read) cell_read[idx[IW-1:0]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp       <= SC_RSP_IDLE;
      busy      <= 1'b0;
      cur       <= '0;
      pend      <= 1'b0;
      pend_idx  <= '0;
      pend_word <= '0;
      pend_n    <= '0;
      word_buf  <= '0;
    end else begin
      rsp <= SC_RSP_IDLE;
      if (req.read && !busy && !hit) begin
        rsp.unknown_addr <= 1'b1;
      end else if (take_piece) begin
        rsp.data      <= word_buf[32*pend_word +: 32];
        rsp.dataready <= 1'b1;
        pend_word     <= pend_word + 1'b1;
        if (pend_word + 2'd1 >= pend_n) pend <= 1'b0;
      end else if (start_read) begin
        pend <= 1'b0;
        busy <= 1'b1;
        cur  <= idx;
      end
      if (busy && cell_ready[cur[IW-1:0]]) begin
        busy          <= 1'b0;
        rsp.data      <= cur_word[31:0];
        rsp.dataready <= 1'b1;
        if (cell_nwords[cur] > 2'd1) begin
          pend      <= 1'b1;
          pend_idx  <= cur;
          pend_word <= 2'd1;
          pend_n    <= cell_nwords[cur];
          word_buf  <= cur_word;
        end
      end else if (busy && cell_nomore[cur[IW-1:0]]) begin
        busy             <= 1'b0;
        rsp.no_more_data <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(busy && req.read))
    else $error("fifo_mux: read issued while a FIFO read is outstanding");
  assert property (@(posedge clk) disable iff (rst) !req.write)
    else $error("fifo_mux: FIFO cells are read-only");

endmodule
