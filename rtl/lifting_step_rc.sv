// lifting_step_rc: predict + update lifting step with recombined partial
// results, for interleaved sequences whose state must be kept small.
//
// It computes the same step as lifting_step,
//   d_m = o_m + A*(e_m + e_{m+1}),   s_m = e_m + B*(d_{m-1} + d_m),
// with whole-sample symmetric extension (e_R = e_{R-1}, d_{-1} = d_0), but
// each product is formed once and used twice. When pair t arrives:
//   P = A*e_t                 d_{t-1} = p + P       p <= o_t + P
//   Q = B*d_{t-1}             s_{t-1} = q + Q       q <= e_t + Q
// so between visits a slot holds only two partial sums, p (a predict still
// waiting for its right neighbour) and q (an update still waiting for its
// right neighbour), instead of the raw even, odd and predict samples. On the
// last pair (in_last) the right mirror is applied at once, p <= o + 2P, so
// the closing flush only has to read p. On pair 0, q <= e_0 and the first
// update adds Q twice (left mirror). Products are rounded one by one, so
// results can differ by an LSB from the pre-add form of lifting_step.
//
// Four register stages, each holding one multiplier or at most two adders:
//   1  P = A*e                      (event cycle)
//   2  p read, d = p + P, p written (memory 1)
//   3  Q = B*d
//   4  q read, s = q + Q, q written with its flag and tag (memory 2)
// so an output leaves COL_STEP_LAT = 4 cycles after its event. Each memory
// is read and written in a single stage, so events may follow each other in
// any slot order, one per cycle. The event interface is that of
// lifting_step, plus in_last.
// Storing recombined intermediates, so the column filter's temporal buffer
// holds two words per column and step (4N in all), follows the document;
// the exact choice of p and q and the in_last mirror are this design's.
module lifting_step_rc
  import dwt_pkg::*;
#(
  parameter coef_t       A     = ALPHA,
  parameter coef_t       B     = BETA,
  parameter int unsigned DEPTH = 1,
  parameter int unsigned TAG_W = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_flush,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [AW-1:0]    in_slot,
  input  logic [TAG_W-1:0] in_tag,
  input  sample_t          in_e,
  input  sample_t          in_o,
  output logic             out_valid,
  output logic             out_first,
  output logic             out_last,
  output logic [AW-1:0]    out_slot,
  output logic [TAG_W-1:0] out_tag,
  output sample_t          out_s,
  output sample_t          out_d
);
  typedef struct packed {
    sample_t          q;       // e_{t-1} + B*d_{t-2}
    logic [TAG_W-1:0] tag;     // tag of pair t-1
    logic             first;   // pair t-1 is pair 0
  } qent_t;

  // what travels down the pipeline with an event
  typedef struct packed {
    logic             write;     // data event: the slot state is updated
    logic             produce;   // the event completes a pair
    logic             first;     // the event's pair is pair 0
    logic             last;      // seen by stage 2: in_last; by 3-4: flush event
    logic [AW-1:0]    slot;
    logic [TAG_W-1:0] tag;
    sample_t          e;
    sample_t          o;         // seen by stage 2: o; by stage 4: d
    sample_t          x;         // seen by stage 2: P; 3: d; 4: Q
  } ctl_t;

  ctl_t    c1, c2, c3;
  ctl_t    n1, n2, n3;

  // ---------------- stage 1: P = A*e ----------------
  always_comb begin
    n1.write   = in_valid;
    n1.produce = in_flush || (in_valid && !in_first);
    n1.first   = in_first;
    n1.last    = in_last;
    n1.slot    = in_slot;
    n1.tag     = in_tag;
    n1.e       = in_e;
    n1.o       = in_o;
    n1.x       = in_valid ? coef_mul(A, (DATA_W+1)'(in_e)) : '0;
  end

  // ---------------- stage 2: predict, p memory ----------------
  sample_t p_rd, p_wr;

  temporal_buffer #(.DEPTH(DEPTH), .W(DATA_W)) u_pmem (
    .clk   (clk),
    .we    (c1.write),
    .waddr (c1.slot),
    .wdata (p_wr),
    .raddr (c1.slot),
    .rdata (p_rd)
  );

  always_comb begin
    p_wr = c1.o + c1.x + (c1.last ? c1.x : '0);   // right mirror on the last pair
    n2      = c1;
    n2.last = c1.produce && !c1.write;            // a flush completes without data
    n2.x    = p_rd + c1.x;                        // d_{t-1} (P = 0 on a flush)
  end

  // ---------------- stage 3: Q = B*d ----------------
  always_comb begin
    n3   = c2;
    n3.x = c2.produce ? coef_mul(B, (DATA_W+1)'(c2.x)) : '0;
    n3.o = c2.x;                                  // d travels on as the output
  end

  // ---------------- stage 4: update, q memory ----------------
  qent_t   q_rd, q_wr;
  sample_t s_new;

  temporal_buffer #(.DEPTH(DEPTH), .W($bits(qent_t))) u_qmem (
    .clk   (clk),
    .we    (c3.write),
    .waddr (c3.slot),
    .wdata (q_wr),
    .raddr (c3.slot),
    .rdata (q_rd)
  );

  always_comb begin
    s_new      = q_rd.q + c3.x + (q_rd.first ? c3.x : '0);   // left mirror
    q_wr.q     = c3.e + c3.x;
    q_wr.tag   = c3.tag;
    q_wr.first = c3.first;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1        <= '0;
      c2        <= '0;
      c3        <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_slot  <= '0;
      out_tag   <= '0;
      out_s     <= '0;
      out_d     <= '0;
    end else begin
      c1        <= n1;
      c2        <= n2;
      c3        <= n3;
      out_valid <= c3.produce;
      if (c3.produce) begin
        out_first <= q_rd.first;
        out_last  <= c3.last;
        out_slot  <= c3.slot;
        out_tag   <= q_rd.tag;
        out_s     <= s_new;
        out_d     <= c3.o;
      end
    end
  end

  a_one_event: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && in_flush))
    else $error("lifting_step_rc: data and flush event in the same cycle");

endmodule
