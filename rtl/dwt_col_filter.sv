// dwt_col_filter: vertical 9/7 lifting on interleaved columns.
//
// Each cycle it may take one vertical pair (top = row 2r, bottom = row 2r+1)
// of one column slot (slot 2k: L column k, slot 2k+1: H column k). Two
// cascaded recombined lifting steps (lifting_step_rc: alpha/beta, then
// gamma/delta) each keep two partial sums per slot from the previous row
// pair in temporal buffers of N entries, so the whole column transform needs
// 4N words of line memory and no frame buffer. Row pair 0 is the top edge
// and row pair H/2-1 the bottom edge (both mirrored).
// After the last row pair, the controller closes every column with two flush
// passes: flush1 events for slots 0..N-1 to step 1, then, at least
// COL_STEP_LAT cycles after the last step-1 event, flush2 events for slots
// 0..N-1 to step 2.
// Outputs, COL_STEP_LAT cycles after the step-2 event that completes them: out_low
// (vertical low pass) and out_high (vertical high pass) of subband row
// out_row for slot out_slot. For an L slot they are LL and LH, for an H slot
// HL and HH.
// The document places a temporal buffer of 4N in the column filter and
// stores recombined intermediate results; the slot-interleaved organisation,
// the choice of partial sums and the flush passes are this design's.
module dwt_col_filter
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 256,   // image width: N column slots
  parameter int unsigned H      = 256,   // image height (even)
  parameter int unsigned RTAG_W = 8,
  localparam int unsigned SW    = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [SW-1:0]     in_slot,
  input  logic [RTAG_W-1:0] in_row,
  input  sample_t           in_top,
  input  sample_t           in_bot,
  input  logic              flush1,
  input  logic              flush2,
  input  logic [SW-1:0]     flush_slot,
  output logic              out_valid,
  output logic              out_last,
  output logic [SW-1:0]     out_slot,
  output logic [RTAG_W-1:0] out_row,
  output sample_t           out_low,
  output sample_t           out_high
);
  logic          s1_valid, s1_first, s1_last;
  logic [SW-1:0] s1_slot;
  logic [RTAG_W-1:0] s1_tag;
  sample_t       s1_s, s1_d;

  lifting_step_rc #(.A(ALPHA), .B(BETA), .DEPTH(N), .TAG_W(RTAG_W)) u_step1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_flush  (flush1),
    .in_first  (in_row == '0),
    .in_last   (in_row == RTAG_W'(H/2 - 1)),
    .in_slot   (flush1 ? flush_slot : in_slot),
    .in_tag    (in_row),
    .in_e      (in_top),
    .in_o      (in_bot),
    .out_valid (s1_valid),
    .out_first (s1_first),
    .out_last  (s1_last),
    .out_slot  (s1_slot),
    .out_tag   (s1_tag),
    .out_s     (s1_s),
    .out_d     (s1_d)
  );

  logic out_first;

  lifting_step_rc #(.A(GAMMA), .B(DELTA), .DEPTH(N), .TAG_W(RTAG_W)) u_step2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s1_valid),
    .in_flush  (flush2),
    .in_first  (s1_first),
    .in_last   (s1_last),
    .in_slot   (flush2 ? flush_slot : s1_slot),
    .in_tag    (s1_tag),
    .in_e      (s1_s),
    .in_o      (s1_d),
    .out_valid (out_valid),
    .out_first (out_first),
    .out_last  (out_last),
    .out_slot  (out_slot),
    .out_tag   (out_row),
    .out_s     (out_low),
    .out_d     (out_high)
  );

  logic unused;
  assign unused = out_first;

endmodule
