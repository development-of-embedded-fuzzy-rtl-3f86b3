// compat_mf: strengths of the five rules of one rule-table row.
//
// Fuzzy AND is the minimum: w[j] = min(mu_e, mu_de[j]) for the one error grade
// mu_e of this row and each of the five change-of-error grades. Five calls of
// this block give all 25 rule strengths. Purely combinational.
module compat_mf
  import flc_pkg::*;
(
  input  mu_t     mu_e,
  input  mu_vec_t mu_de,
  output mu_vec_t w
);
  always_comb
    for (int j = 0; j < NUM_MF; j++)
      w[j] = (mu_e < mu_de[j]) ? mu_e : mu_de[j];
endmodule
