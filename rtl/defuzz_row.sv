// defuzz_row: weighted output of one rule-table row (zero-order Sugeno).
//
// num = sum_j w[j] * z[j] and den = sum_j w[j] over the five rules of the row,
// z being the rule consequent in half units (-2..2, i.e. -1..1 in steps of
// 1/2). Keeping z in half units keeps the products small; the final weighted
// average scales the result back to FULL_SCALE. Purely combinational.
module defuzz_row
  import flc_pkg::*;
#(
  parameter int NUM_W = 20,   // holds 5 * 10000 * 2 with sign
  parameter int DEN_W = 16    // holds 5 * 10000
) (
  input  mu_vec_t                 w,
  input  logic [0:NUM_MF-1][RULE_W-1:0] z,
  output logic signed [NUM_W-1:0] num,
  output logic        [DEN_W-1:0] den
);
  always_comb begin
    num = '0;
    den = '0;
    for (int j = 0; j < NUM_MF; j++) begin
      num += NUM_W'($signed({1'b0, w[j]}) * $signed(z[j]));
      den += DEN_W'(w[j]);
    end
  end
endmodule
