// flc_core: two-input, single-output zero-order Sugeno fuzzy controller.
//
// Stage 1 (fuzzification): the error and change-of-error inputs, already
// normalised so that 10000 = 1.0, are saturated to +/-10000 and each turned
// into five membership grades. Stage 2 (inference): for each of the five
// error grades a compat_mf forms the five rule strengths of that rule-table
// row (fuzzy AND = min), and a defuzz_row forms that row's sum(w*z) and
// sum(w). Stage 3 (defuzzification): weighted_avg divides the totals,
// giving the crisp output in -10000..10000. No output membership functions
// exist; each rule's consequent is a single value from the RULES table.
//
// Interface: start samples e_in/de_in; done pulses LATENCY cycles later with
// y valid (y holds until the next done). sat_e/sat_de report whether the
// sampled inputs were clipped. A start while busy is ignored.
// Timing: LATENCY = 1 (input register) + weighted_avg latency = 41 cycles.
module flc_core
  import flc_pkg::*;
#(
  parameter int          RAW_W = 32,
  parameter rule_table_t RULES = RULES_PRELIM,
  parameter mf_shape_e   SHAPE = MF_TRIANGLE
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [RAW_W-1:0] e_in,
  input  logic signed [RAW_W-1:0] de_in,
  output logic                    busy,
  output logic                    done,
  output fin_t                    y,
  output logic                    sat_e,
  output logic                    sat_de
);
  localparam int ROW_NUM_W = 20;
  localparam int ROW_DEN_W = 16;

  logic signed [RAW_W-1:0] e_q, de_q;
  logic                    stage2;
  logic                    avg_busy;
  fin_t                    e_sat, de_sat;
  logic                    e_clip, de_clip;
  mu_vec_t                 mu_e, mu_de;
  mu_vec_t                 w [NUM_MF];
  logic signed [ROW_NUM_W-1:0] row_num [NUM_MF];
  logic        [ROW_DEN_W-1:0] row_den [NUM_MF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q    <= '0;
      de_q   <= '0;
      stage2 <= 1'b0;
      sat_e  <= 1'b0;
      sat_de <= 1'b0;
    end else begin
      stage2 <= 1'b0;
      if (start && !busy) begin
        e_q    <= e_in;
        de_q   <= de_in;
        stage2 <= 1'b1;
      end
      if (stage2) begin
        sat_e  <= e_clip;
        sat_de <= de_clip;
      end
    end
  end

  fuzzifier_5mf #(.RAW_W(RAW_W), .SHAPE(SHAPE)) u_fz_e (
    .x_raw(e_q), .x_sat(e_sat), .sat(e_clip), .mu(mu_e));

  fuzzifier_5mf #(.RAW_W(RAW_W), .SHAPE(SHAPE)) u_fz_de (
    .x_raw(de_q), .x_sat(de_sat), .sat(de_clip), .mu(mu_de));

  for (genvar r = 0; r < NUM_MF; r++) begin : g_row
    compat_mf u_compat (.mu_e(mu_e[r]), .mu_de(mu_de), .w(w[r]));

    defuzz_row #(.NUM_W(ROW_NUM_W), .DEN_W(ROW_DEN_W)) u_row (
      .w  (w[r]),
      .z  (RULES[r]),
      .num(row_num[r]),
      .den(row_den[r]));
  end

  weighted_avg #(.ROW_NUM_W(ROW_NUM_W), .ROW_DEN_W(ROW_DEN_W)) u_avg (
    .clk, .rst_n,
    .start  (stage2),
    .row_num(row_num),
    .row_den(row_den),
    .busy   (avg_busy),
    .done   (done),
    .y      (y));

  always_comb busy = stage2 | avg_busy;
endmodule
