// dwt_pkg: shared word format, lifting coefficients and the fixed-point
// multiply used by every block of the 2-D 9/7 lifting DWT.
//
// Samples are 20-bit two's-complement integers, the register width used
// throughout the datapath. Lifting coefficients are signed fixed point with
// COEF_FRAC fractional bits; a product is rounded to the nearest integer
// (half rounds towards +infinity) before it is added back into the data path.
// The four coefficients are the standard CDF 9/7 lifting factors
// alpha, beta, gamma, delta. No final K normalisation is applied: the
// outputs are the raw lifting outputs, as in the lifting equations. The
// fractional width and rounding rule are this design's own choice.
package dwt_pkg;

  localparam int unsigned DATA_W    = 20;
  localparam int unsigned COEF_W    = 18;
  localparam int unsigned COEF_FRAC = 14;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // round(c * 2^14)
  localparam coef_t ALPHA = -18'sd25987;  // -1.586134342
  localparam coef_t BETA  = -18'sd868;    // -0.052980119
  localparam coef_t GAMMA =  18'sd14466;  //  0.882911076
  localparam coef_t DELTA =  18'sd7266;   //  0.443506852

  // Pipeline depths, in cycles from an event to its output. Every stage
  // holds one multiplier or at most two adders.
  localparam int unsigned UNIT_LAT     = 3;               // lift_unit
  localparam int unsigned ROW_STEP_LAT = 2 * UNIT_LAT;    // lifting_step
  localparam int unsigned COL_STEP_LAT = 4;               // lifting_step_rc

  // k * x rounded to an integer sample (the sum is truncated to DATA_W bits).
  function automatic sample_t coef_mul(input coef_t k, input logic signed [DATA_W:0] x);
    logic signed [DATA_W+COEF_W:0] p;
    p = k * x;
    p = p + (DATA_W+COEF_W+1)'(1 << (COEF_FRAC-1));
    return sample_t'(p >>> COEF_FRAC);
  endfunction

endpackage
