// lift_unit: the modified lifting computing unit, pipelined.
//
// Computes y = i2 + k*(i1 + i3). The two neighbours i1 and i3 are added
// first and multiplied once, so one multiplier serves both neighbour
// branches. This pre-add form is the document's modified computing unit.
// The unit is cut into three register stages, pre-add | multiply | add, so
// that no stage holds more than the multiplier; y appears UNIT_LAT = 3
// cycles after its operands. The stage cuts and the fixed-point rounding of
// the product (see dwt_pkg::coef_mul) are this design's choice.
//
// The registers have no enable and no reset: the caller tracks which
// results are valid. K is the lifting coefficient in COEF_FRAC fixed point.
module lift_unit
  import dwt_pkg::*;
#(
  parameter coef_t K = ALPHA
) (
  input  logic    clk,
  input  sample_t i1,   // left neighbour
  input  sample_t i2,   // sample being updated
  input  sample_t i3,   // right neighbour
  output sample_t y
);
  logic signed [DATA_W:0] s1_sum;
  sample_t                s1_i2, s2_prod, s2_i2;

  always_ff @(posedge clk) begin
    s1_sum  <= (DATA_W+1)'(i1) + (DATA_W+1)'(i3);
    s1_i2   <= i2;
    s2_prod <= coef_mul(K, s1_sum);
    s2_i2   <= s1_i2;
    y       <= s2_i2 + s2_prod;
  end

endmodule
