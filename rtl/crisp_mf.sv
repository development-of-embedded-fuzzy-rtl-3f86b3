// crisp_mf: crisp (singleton) membership function.
//
// Grade is FULL_SCALE when x equals the parameter C and 0 otherwise.
// Purely combinational.
module crisp_mf
  import flc_pkg::*;
#(
  parameter int C = 0
) (
  input  fin_t x,
  output mu_t  mu
);
  always_comb mu = (int'(x) == C) ? MU_W'(FULL_SCALE) : '0;
endmodule
