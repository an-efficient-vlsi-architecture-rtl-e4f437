// dwt_row_filter: 1-D 9/7 lifting transform of one image row.
//
// Pixels of a row arrive serially (one per pix_valid cycle, pix_sor on the
// first). A splitter forms (even, odd) pairs; two cascaded lifting steps
// apply the four 9/7 lifting factors: step 1 predicts with alpha and updates
// with beta, step 2 predicts with gamma and updates with delta. The outputs
// are, per pair k of the row, the low-pass coefficient L(k) (out_l, the
// updated even sample) and the high-pass coefficient H(k) (out_h, the
// predicted odd sample).
//
// Row ends are closed by two flush events from the controller: flush1 (to
// step 1) at least two cycles after the last pixel, flush2 (to step 2) at
// least ROW_STEP_LAT + 2 cycles after flush1, in cycles where that step
// receives no data. The row's tag (row_tag, sampled with each pair) returns
// with each output together with the pair index k. Latency from the odd
// pixel of pair k+2 (or the flushes, for the last two pairs) to the output
// is 2 * ROW_STEP_LAT = 12 cycles.
// The splitter, the predict/update lifting steps and the 20-bit registers
// follow the document's lifting-step figure; cascading two steps for the
// four 9/7 factors and the flush protocol are this design's choices.
module dwt_row_filter
  import dwt_pkg::*;
#(
  parameter int unsigned N     = 256,
  parameter int unsigned RTAG_W = 8,
  localparam int unsigned KW   = $clog2(N/2),
  localparam int unsigned TW   = RTAG_W + KW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pix_valid,
  input  logic              pix_sor,
  input  sample_t           pix,
  input  logic [RTAG_W-1:0] row_tag,
  input  logic              flush1,
  input  logic              flush2,
  output logic              out_valid,
  output logic              out_first,
  output logic              out_last,
  output logic [RTAG_W-1:0] out_row_tag,
  output logic [KW-1:0]     out_k,
  output sample_t           out_l,
  output sample_t           out_h
);
  logic          pr_valid, pr_first;
  logic [KW-1:0] pr_idx;
  sample_t       pr_e, pr_o;

  splitter #(.N(N)) u_split (
    .clk        (clk),
    .rst_n      (rst_n),
    .pix_valid  (pix_valid),
    .pix_sor    (pix_sor),
    .pix        (pix),
    .pair_valid (pr_valid),
    .pair_first (pr_first),
    .pair_idx   (pr_idx),
    .even       (pr_e),
    .odd        (pr_o)
  );

  logic          s1_valid, s1_first, s1_last;
  logic [0:0]    s1_slot;
  logic [TW-1:0] s1_tag;
  sample_t       s1_s, s1_d;

  lifting_step #(.A(ALPHA), .B(BETA), .DEPTH(1), .TAG_W(TW)) u_step1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (pr_valid),
    .in_flush  (flush1),
    .in_first  (pr_first),
    .in_slot   (1'b0),
    .in_tag    ({row_tag, pr_idx}),
    .in_e      (pr_e),
    .in_o      (pr_o),
    .out_valid (s1_valid),
    .out_first (s1_first),
    .out_last  (s1_last),
    .out_slot  (s1_slot),
    .out_tag   (s1_tag),
    .out_s     (s1_s),
    .out_d     (s1_d)
  );

  logic          s2_last;
  logic [0:0]    s2_slot;
  logic [TW-1:0] s2_tag;

  lifting_step #(.A(GAMMA), .B(DELTA), .DEPTH(1), .TAG_W(TW)) u_step2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s1_valid),
    .in_flush  (flush2),
    .in_first  (s1_first),
    .in_slot   (1'b0),
    .in_tag    (s1_tag),
    .in_e      (s1_s),
    .in_o      (s1_d),
    .out_valid (out_valid),
    .out_first (out_first),
    .out_last  (s2_last),
    .out_slot  (s2_slot),
    .out_tag   (s2_tag),
    .out_s     (out_l),
    .out_d     (out_h)
  );

  // The step-2 output caused by flush2 is pair R-1; report it by index.
  assign out_row_tag = s2_tag[TW-1:KW];
  assign out_k       = s2_tag[KW-1:0];
  assign out_last    = s2_last;

  logic unused;
  assign unused = ^{s1_last, s1_slot, s2_slot};

endmodule
