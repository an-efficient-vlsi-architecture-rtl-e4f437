// transpose_buffer: turns row-filter results into vertical pairs.
//
// The two row filters work in lockstep on rows 2r (top) and 2r+1 (bottom).
// When they deliver L(k) and H(k) of both rows (in_valid), the buffer passes
// the low-pass vertical pair (L_top, L_bot) straight to the column filter in
// that cycle and parks the high-pass pair (H_top, H_bot) in two registers;
// in the next cycle it sends the parked pair. A third register holds the
// pending flag with the column and row-pair tags. Two multiplexers choose
// between the direct and the parked pair, so the column filter gets one
// vertical pair per cycle from two row filters that each deliver one result
// every other cycle. Column slots are interleaved: slot 2k is L column k,
// slot 2k+1 is H column k.
// The size (three registers, two multiplexers) is the document's; the exact
// register contents and the interleaving are this design's reading of it.
// in_valid may not be high in two consecutive cycles.
module transpose_buffer
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 256,
  parameter int unsigned RTAG_W = 8,
  localparam int unsigned KW    = $clog2(N/2),
  localparam int unsigned SW    = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [RTAG_W-1:0] in_row,
  input  logic [KW-1:0]     in_k,
  input  sample_t           in_l_top,
  input  sample_t           in_h_top,
  input  sample_t           in_l_bot,
  input  sample_t           in_h_bot,
  output logic              col_valid,
  output logic [SW-1:0]     col_slot,
  output logic [RTAG_W-1:0] col_row,
  output sample_t           col_top,
  output sample_t           col_bot
);
  typedef struct packed {
    logic              valid;
    logic [RTAG_W-1:0] row;
    logic [KW-1:0]     k;
  } pend_t;

  sample_t h_top_q, h_bot_q;   // registers 1 and 2: parked H pair
  pend_t   pend_q;             // register 3: pending flag and tags

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_top_q <= '0;
      h_bot_q <= '0;
      pend_q  <= '0;
    end else begin
      pend_q.valid <= in_valid;
      if (in_valid) begin
        h_top_q    <= in_h_top;
        h_bot_q    <= in_h_bot;
        pend_q.row <= in_row;
        pend_q.k   <= in_k;
      end
    end
  end

  // The two multiplexers: the direct L pair when it arrives, else the parked H pair.
  always_comb begin
    col_valid = in_valid || pend_q.valid;
    if (in_valid) begin
      col_top  = in_l_top;
      col_bot  = in_l_bot;
      col_slot = {in_k, 1'b0};
      col_row  = in_row;
    end else begin
      col_top  = h_top_q;
      col_bot  = h_bot_q;
      col_slot = {pend_q.k, 1'b1};
      col_row  = pend_q.row;
    end
  end

  a_no_back_to_back: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && pend_q.valid))
    else $error("transpose_buffer: row results on two consecutive cycles");

endmodule
