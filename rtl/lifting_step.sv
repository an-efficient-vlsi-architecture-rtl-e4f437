// lifting_step: one predict + update lifting step on (even, odd) pairs.
//
// For pair m = (e_m, o_m) of a sequence of R pairs it produces
//   d_m = o_m + A*(e_m + e_{m+1})          predict (coefficient A)
//   s_m = e_m + B*(d_{m-1} + d_m)          update  (coefficient B)
// with whole-sample symmetric extension at both ends: e_R = e_{R-1} and
// d_{-1} = d_0. Both equations use the pre-add computing unit (lift_unit).
//
// Several independent sequences can be interleaved: every event names a
// slot, and the step keeps the last even sample, odd sample, predict output,
// tag and a "previous pair was pair 0" flag of each slot in a
// temporal_buffer of DEPTH entries. The row filters use DEPTH = 1; the
// column filter uses the recombined variant, lifting_step_rc, which keeps
// fewer words per slot.
//
// Events (at most one per cycle, in_valid and in_flush never together):
//   in_valid : a new pair for slot in_slot; in_first marks pair 0.
//   in_flush : no new data; closes the sequence of in_slot (mirror e_R).
// Pair m is completed when pair m+1 (or the flush) arrives, so every event
// except a first pair produces one output pair (s_m, d_m) ROW_STEP_LAT = 6
// cycles later. The event cycle reads and writes the slot's even, odd, tag
// and flag and feeds the predict unit; three cycles later the predict result
// d_m leaves it, the slot's d_{m-1} is read (and d_m written) in a second
// memory, and the update unit starts; three cycles after that s_m leaves
// it. out_first marks m = 0, out_last the output caused by a flush, out_tag
// returns the tag that came with pair m, out_slot the slot.
// The predict/update structure built from two computing units follows the
// document's lifting-step figure; the pipeline cuts, slotting, flush events
// and tags are this design's own.
module lifting_step
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
    sample_t          e;       // e_{m}
    sample_t          o;       // o_{m}
    logic [TAG_W-1:0] tag;     // tag of pair m
    logic             first;   // pair m is pair 0
  } state_t;

  // what travels beside a computing unit: the pair being completed
  typedef struct packed {
    logic             valid;
    logic             first;
    logic             last;
    logic [AW-1:0]    slot;
    logic [TAG_W-1:0] tag;
    sample_t          x;       // e_m beside the predict, d_m beside the update
  } side_t;

  // ---------------- event cycle: slot state, predict operands ----------------
  state_t st_rd, st_wr;
  sample_t e_next;
  side_t  a_in;

  temporal_buffer #(.DEPTH(DEPTH), .W($bits(state_t))) u_state (
    .clk   (clk),
    .we    (in_valid),
    .waddr (in_slot),
    .wdata (st_wr),
    .raddr (in_slot),
    .rdata (st_rd)
  );

  always_comb begin
    e_next      = in_flush ? st_rd.e : in_e;        // mirror at the right end
    st_wr.e     = in_e;
    st_wr.o     = in_o;
    st_wr.tag   = in_tag;
    st_wr.first = in_first;
    a_in.valid  = in_flush || (in_valid && !in_first);
    a_in.first  = st_rd.first;
    a_in.last   = in_flush;
    a_in.slot   = in_slot;
    a_in.tag    = st_rd.tag;
    a_in.x      = st_rd.e;
  end

  sample_t d_new;

  lift_unit #(.K(A)) u_predict (
    .clk (clk),
    .i1  (st_rd.e),
    .i2  (st_rd.o),
    .i3  (e_next),
    .y   (d_new)
  );

  side_t a_q [UNIT_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < UNIT_LAT; i++) a_q[i] <= '0;
    end else begin
      a_q[0] <= a_in;
      for (int i = 1; i < UNIT_LAT; i++) a_q[i] <= a_q[i-1];
    end
  end

  // ---------------- d_m ready: left mirror, update operands ----------------
  side_t   pa, b_in;
  sample_t d_prev, d_left;

  assign pa = a_q[UNIT_LAT-1];

  temporal_buffer #(.DEPTH(DEPTH), .W(DATA_W)) u_dmem (
    .clk   (clk),
    .we    (pa.valid),
    .waddr (pa.slot),
    .wdata (d_new),
    .raddr (pa.slot),
    .rdata (d_prev)
  );

  always_comb begin
    d_left = pa.first ? d_new : d_prev;             // mirror at the left end
    b_in   = pa;
    b_in.x = d_new;
  end

  lift_unit #(.K(B)) u_update (
    .clk (clk),
    .i1  (d_left),
    .i2  (pa.x),
    .i3  (d_new),
    .y   (out_s)
  );

  side_t b_q [UNIT_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < UNIT_LAT; i++) b_q[i] <= '0;
    end else begin
      b_q[0] <= b_in;
      for (int i = 1; i < UNIT_LAT; i++) b_q[i] <= b_q[i-1];
    end
  end

  always_comb begin
    out_valid = b_q[UNIT_LAT-1].valid;
    out_first = b_q[UNIT_LAT-1].first;
    out_last  = b_q[UNIT_LAT-1].last;
    out_slot  = b_q[UNIT_LAT-1].slot;
    out_tag   = b_q[UNIT_LAT-1].tag;
    out_d     = b_q[UNIT_LAT-1].x;
  end

  a_one_event: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && in_flush))
    else $error("lifting_step: data and flush event in the same cycle");

endmodule
