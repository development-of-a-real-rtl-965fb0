// register_mux - multiplexer for the register-cell address range (0x3000..).
//
// The low address byte selects register cell 0..N-1 and its current value
// is returned one cycle after the read.  Values wider than 32 bits are sent
// in up to three 32-bit pieces: the first read returns bits 31:0 and
// freezes the whole value, and each following read of the same address
// returns the next piece of that frozen value, so both halves of a 64-bit
// register belong to the same sample.  A read of any other address drops
// the frozen value.  Indices of N or more answer unknown_addr.
// Interface: req is the decoded request for this segment (reads only); rsp
// carries one response pulse per request, one cycle later.
module register_mux
  import demon_pkg::*;
#(
  parameter int N      = 12,
  parameter int WORD_W = 72
) (
  input  logic                     clk,
  input  logic                     rst,
  input  sc_req_t                  req,
  output sc_rsp_t                  rsp,
  input  logic [N-1:0][WORD_W-1:0] cell_value,
  input  logic [N-1:0][1:0]        cell_nwords
);

  localparam int BUF_W = (WORD_W > 3 * SC_DATA_W) ? WORD_W : 3 * SC_DATA_W;

  logic [7:0]       idx;
  logic             hit, pend, take_piece;
  logic [7:0]       pend_idx;
  logic [1:0]       pend_word, pend_n;
  logic [BUF_W-1:0] word_buf, sel_word;

  assign idx        = req.addr[7:0];
  assign hit        = 32'(idx) < N;
  assign take_piece = req.read && hit && pend && (pend_idx == idx);
  assign sel_word   = hit ? BUF_W'(cell_value[idx]) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp       <= SC_RSP_IDLE;
      pend      <= 1'b0;
      pend_idx  <= '0;
      pend_word <= '0;
      pend_n    <= '0;
      word_buf  <= '0;
    end else begin
      rsp <= SC_RSP_IDLE;
      if (req.read && !hit) begin
        rsp.unknown_addr <= 1'b1;
      end else if (take_piece) begin
        rsp.data      <= word_buf[32*pend_word +: 32];
        rsp.dataready <= 1'b1;
        pend_word     <= pend_word + 1'b1;
        if (pend_word + 2'd1 >= pend_n) pend <= 1'b0;
      end else if (req.read) begin
        rsp.data      <= sel_word[31:0];
        rsp.dataready <= 1'b1;
        pend          <= cell_nwords[idx] > 2'd1;
        pend_idx      <= idx;
        pend_word     <= 2'd1;
        pend_n        <= cell_nwords[idx];
        word_buf      <= sel_word;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !req.write)
    else $error("register_mux: register cells are read-only");

endmodule
