// dwt2d_top: one-level 2-D 9/7 lifting DWT with two-row parallel scanning.
//
// An N x N frame is read two rows at a time: each accepted cycle brings
// in_top = x(2r, j) and in_bot = x(2r+1, j), column by column. Two row
// filters (one per row of the pair) run the 1-D 9/7 lifting along the rows
// and deliver L(k) and H(k) of both rows every other cycle. The transposing
// buffer turns these into vertical pairs, one per cycle, which the column
// filter transforms using its per-column temporal buffer. Every output cycle
// carries two coefficients of one subband column: for an L column
// (out_hband = 0) out_low = LL(r, k) and out_high = LH(r, k); for an H
// column (out_hband = 1) out_low = HL(r, k) and out_high = HH(r, k), where
// r is out_row and k is out_col (first letter: horizontal band, second:
// vertical band). Edges use whole-sample symmetric extension.
//
// Interface: in_valid/in_ready handshake on the input; outputs are valid
// for one cycle with out_valid, and frame_done pulses when the last
// coefficient of a frame has been delivered. Each row pair takes N + 2
// cycles (two cycles close the row in the row filters), and the frame ends
// with two column flush passes of N cycles each: at full input rate
// frame_done comes N*N/2 + 3N + 24 cycles after the first accepted column.
// No K normalisation is applied to the subbands.
// The two-input parallel scanning, the row filter / transposing buffer /
// column filter chain and the 20-bit words follow the document; the
// handshake, control and output format are this design's.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N  = 256,
  localparam int unsigned R  = N / 2,
  localparam int unsigned RW = $clog2(R),
  localparam int unsigned SW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  sample_t       in_top,
  input  sample_t       in_bot,
  output logic          out_valid,
  output logic          out_hband,
  output logic [RW-1:0] out_row,
  output logic [RW-1:0] out_col,
  output sample_t       out_low,
  output sample_t       out_high,
  output logic          frame_done
);
  logic          accept, pix_sor, row_flush1, row_flush2, col_flush1, col_flush2;
  logic [RW-1:0] row_pair;
  logic [SW-1:0] flush_slot;

  dwt2d_ctrl #(.N(N)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .accept     (accept),
    .pix_sor    (pix_sor),
    .row_pair   (row_pair),
    .row_flush1 (row_flush1),
    .row_flush2 (row_flush2),
    .col_flush1 (col_flush1),
    .col_flush2 (col_flush2),
    .flush_slot (flush_slot),
    .frame_done (frame_done)
  );

  logic          rt_valid, rb_valid, rt_first, rb_first, rt_last, rb_last;
  logic [RW-1:0] rt_row, rb_row, rt_k, rb_k;
  sample_t       rt_l, rt_h, rb_l, rb_h;

  dwt_row_filter #(.N(N), .RTAG_W(RW)) u_row_top (
    .clk         (clk),
    .rst_n       (rst_n),
    .pix_valid   (accept),
    .pix_sor     (pix_sor),
    .pix         (in_top),
    .row_tag     (row_pair),
    .flush1      (row_flush1),
    .flush2      (row_flush2),
    .out_valid   (rt_valid),
    .out_first   (rt_first),
    .out_last    (rt_last),
    .out_row_tag (rt_row),
    .out_k       (rt_k),
    .out_l       (rt_l),
    .out_h       (rt_h)
  );

  dwt_row_filter #(.N(N), .RTAG_W(RW)) u_row_bot (
    .clk         (clk),
    .rst_n       (rst_n),
    .pix_valid   (accept),
    .pix_sor     (pix_sor),
    .pix         (in_bot),
    .row_tag     (row_pair),
    .flush1      (row_flush1),
    .flush2      (row_flush2),
    .out_valid   (rb_valid),
    .out_first   (rb_first),
    .out_last    (rb_last),
    .out_row_tag (rb_row),
    .out_k       (rb_k),
    .out_l       (rb_l),
    .out_h       (rb_h)
  );

  logic          cv;
  logic [SW-1:0] cslot;
  logic [RW-1:0] crow;
  sample_t       ctop, cbot;

  transpose_buffer #(.N(N), .RTAG_W(RW)) u_tbuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rt_valid),
    .in_row    (rt_row),
    .in_k      (rt_k),
    .in_l_top  (rt_l),
    .in_h_top  (rt_h),
    .in_l_bot  (rb_l),
    .in_h_bot  (rb_h),
    .col_valid (cv),
    .col_slot  (cslot),
    .col_row   (crow),
    .col_top   (ctop),
    .col_bot   (cbot)
  );

  logic          co_last;
  logic [SW-1:0] co_slot;

  dwt_col_filter #(.N(N), .H(N), .RTAG_W(RW)) u_col (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (cv),
    .in_slot    (cslot),
    .in_row     (crow),
    .in_top     (ctop),
    .in_bot     (cbot),
    .flush1     (col_flush1),
    .flush2     (col_flush2),
    .flush_slot (flush_slot),
    .out_valid  (out_valid),
    .out_last   (co_last),
    .out_slot   (co_slot),
    .out_row    (out_row),
    .out_low    (out_low),
    .out_high   (out_high)
  );

  assign out_hband = co_slot[0];
  assign out_col   = co_slot[SW-1:1];

  // The two row filters see the same control and must stay in lockstep.
  a_rows_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (rt_valid == rb_valid) && (!rt_valid || (rt_k == rb_k && rt_row == rb_row && rt_first == rb_first && rt_last == rb_last)))
    else $error("dwt2d_top: row filters out of step");

  logic unused;
  assign unused = co_last;

endmodule
