// fuzzifier_5mf: fuzzification of one controller input into five sets.
//
// The raw input is first saturated to +/-FULL_SCALE (10000 = 1.0), then fed
// to five membership functions NB, NS, Z, PS, PB centred at -10000, -5000, 0,
// 5000 and 10000. With the default triangular shape the grades of any input
// add up to 10000, e.g. x = -3000 gives {0, 6000, 4000, 0, 0}. The outer sets
// need no special left/right shoulder because the input never passes their
// peaks once saturated.
//
// SHAPE selects the constructor used for all five sets. Triangles are the
// published configuration; the trapezoid option (shoulders 2500 wide, feet
// 3750 from the centre, so neighbouring sets still add up to 10000) and the
// crisp option are this design's choice of how to lay out the other
// constructors on the same five centres.
//
// Purely combinational. sat flags that the raw input was clipped.
module fuzzifier_5mf
  import flc_pkg::*;
#(
  parameter int        RAW_W = 32,
  parameter mf_shape_e SHAPE = MF_TRIANGLE
) (
  input  logic signed [RAW_W-1:0] x_raw,
  output fin_t                    x_sat,
  output logic                    sat,
  output mu_vec_t                 mu
);
  localparam int STEP = FULL_SCALE / 2;

  always_comb begin
    sat = 1'b1;
    if (x_raw > RAW_W'(FULL_SCALE))        x_sat = fin_t'(FULL_SCALE);
    else if (x_raw < -RAW_W'(FULL_SCALE))  x_sat = -fin_t'(FULL_SCALE);
    else begin
      x_sat = fin_t'(x_raw);
      sat   = 1'b0;
    end
  end

  for (genvar i = 0; i < NUM_MF; i++) begin : g_mf
    localparam int CENTER = (i - 2) * STEP;
    if (SHAPE == MF_TRAPEZOID) begin : g_trap
      trapezoid_mf #(.A_PT(CENTER - 3 * STEP / 4), .D_PT(CENTER + 3 * STEP / 4))
        u_mf (.x(x_sat), .mu(mu[i]));
    end else if (SHAPE == MF_CRISP) begin : g_crisp
      crisp_mf #(.C(CENTER)) u_mf (.x(x_sat), .mu(mu[i]));
    end else begin : g_tri
      triangle_mf #(.CENTER(CENTER)) u_mf (.x(x_sat), .mu(mu[i]));
    end
  end
endmodule
