// trapezoid_mf: trapezoidal membership function without division.
//
// Grade = max(min(SLOPE*(x-a), FULL_SCALE, SLOPE*(d-x)), 0). With the default
// SLOPE of 4 each shoulder is a quarter unit (2500) wide, b = a + 2500 and
// c = d - 2500, so no divider is needed. Corner positions A_PT and D_PT are
// parameters; the flat top is whatever lies between the shoulders.
//
// Purely combinational: x in, grade out in the same cycle.
module trapezoid_mf
  import flc_pkg::*;
#(
  parameter int A_PT  = -3750,  // left foot a
  parameter int D_PT  = 3750,   // right foot d
  parameter int SLOPE = 4       // 1/(b-a) = 1/(d-c) in units of 1/FULL_SCALE
) (
  input  fin_t x,
  output mu_t  mu
);
  logic signed [23:0] rise, fall, lo;

  always_comb begin
    rise = 24'(SLOPE) * (24'(x) - 24'(A_PT));
    fall = 24'(SLOPE) * (24'(D_PT) - 24'(x));
    lo   = (rise < fall) ? rise : fall;
    if (lo <= 0)                mu = '0;
    else if (lo >= FULL_SCALE)  mu = MU_W'(FULL_SCALE);
    else                        mu = MU_W'(lo);
  end
endmodule
