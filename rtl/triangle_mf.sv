// triangle_mf: triangular membership function without division.
//
// Grade = max(min(SLOPE*(x-a), SLOPE*(c-x)), 0), capped at FULL_SCALE, where
// a = CENTER - FULL_SCALE/SLOPE and c = CENTER + FULL_SCALE/SLOPE. With the
// default SLOPE of 2 the feet are half a unit (5000) from the peak, which is
// what lets the division of the textbook form (x-a)/(b-a) be replaced by a
// shift. Both the scale (10000 = 1.0) and the fixed foot distance follow the
// published method; the cap at FULL_SCALE is only reached at the peak.
//
// Purely combinational: x in, grade out in the same cycle.
module triangle_mf
  import flc_pkg::*;
#(
  parameter int CENTER = 0,   // peak b, in the 10000 = 1.0 scale
  parameter int SLOPE  = 2    // 1/(b-a) in units of 1/FULL_SCALE
) (
  input  fin_t x,             // saturated input, -10000..10000
  output mu_t  mu             // grade, 0..10000
);
  localparam int A = CENTER - FULL_SCALE / SLOPE;
  localparam int C = CENTER + FULL_SCALE / SLOPE;

  logic signed [23:0] rise, fall, lo;

  always_comb begin
    rise = 24'(SLOPE) * (24'(x) - 24'(A));
    fall = 24'(SLOPE) * (24'(C) - 24'(x));
    lo   = (rise < fall) ? rise : fall;
    if (lo <= 0)                mu = '0;
    else if (lo >= FULL_SCALE)  mu = MU_W'(FULL_SCALE);
    else                        mu = MU_W'(lo);
  end
endmodule
