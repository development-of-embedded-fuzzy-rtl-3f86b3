// flc_pkg: types and constants shared by the fuzzy controller blocks.
//
// All fuzzy quantities use an integer scale in which 1.0 is FULL_SCALE = 10000
// (a 14-bit resolution, n = 14 in A_scaled = A * (2^n - 1) rounded to a
// decimal scale). Inputs of the fuzzy controller are saturated to
// +/-FULL_SCALE, membership grades lie in 0..FULL_SCALE.
//
// The rule table holds the consequent of each of the 25 rules of a zero-order
// Sugeno controller in half units: -2 = -1, -1 = -1/2, 0, +1 = +1/2, +2 = +1.
// Row index = error set, column index = change-of-error set, both in the order
// NB, NS, Z, PS, PB. RULES_PRELIM is the preliminary table, RULES_OPTIMIZED the
// table found by the genetic tuning; both are the published tables.
package flc_pkg;

  localparam int FULL_SCALE = 10000;   // 1.0 in the integer scale
  localparam int NUM_MF     = 5;       // membership functions per input
  localparam int IN_W       = 16;      // saturated fuzzy input, signed
  localparam int MU_W       = 14;      // membership grade, unsigned, 0..10000
  localparam int RULE_W     = 3;       // rule consequent in half units, signed

  typedef logic signed [IN_W-1:0]   fin_t;
  typedef logic        [MU_W-1:0]   mu_t;
  typedef mu_t                      mu_vec_t [NUM_MF];
  typedef logic signed [RULE_W-1:0] rule_t;

  // Packed 5x5 table of rule consequents: [row][col], index 0 = NB
  typedef logic [0:NUM_MF-1][0:NUM_MF-1][RULE_W-1:0] rule_table_t;

  // Membership function shapes the fuzzifier can be built with
  typedef enum logic [1:0] {MF_TRIANGLE = 2'd0, MF_TRAPEZOID = 2'd1, MF_CRISP = 2'd2} mf_shape_e;

  // Controller structure
  typedef enum logic [1:0] {MODE_PD = 2'd0, MODE_PI = 2'd1, MODE_PID = 2'd2} flc_mode_e;

  // Scaling gains, signed Q8.16
  localparam int GAIN_W    = 24;
  localparam int GAIN_FRAC = 16;
  typedef logic signed [GAIN_W-1:0] gain_t;

  typedef struct packed {
    gain_t kp;      // input scaling of the error
    gain_t kd;      // input scaling of the change of error
    gain_t kc_pd;   // output scaling of the PD action
    gain_t kc_pi;   // output scaling of the PI (accumulated) action
  } flc_gains_t;

  // One record of the data-logging loop (one per motor per control step)
  typedef struct packed {
    logic [3:0]         ch;        // motor channel
    logic [15:0]        step;      // control step number, wraps
    logic signed [31:0] setpoint;  // reference speed, mrad/s
    logic signed [31:0] speed;     // measured speed, mrad/s
    logic signed [15:0] u;         // control action, 10000 = full driver range
  } log_rec_t;

  // Preliminary rules (rows e = NB..PB, columns de = NB..PB)
  localparam rule_table_t RULES_PRELIM = '{
    '{-3'sd2, -3'sd2, -3'sd2, -3'sd1,  3'sd0},   // e = NB
    '{-3'sd2, -3'sd2, -3'sd1,  3'sd0,  3'sd1},   // e = NS
    '{-3'sd2, -3'sd1,  3'sd0,  3'sd1,  3'sd2},   // e = Z 
    '{-3'sd1,  3'sd0,  3'sd1,  3'sd2,  3'sd2},   // e = PS
    '{ 3'sd0,  3'sd1,  3'sd2,  3'sd2,  3'sd2}    // e = PB
  };

  // Rules after genetic optimisation
  localparam rule_table_t RULES_OPTIMIZED = '{
    '{-3'sd2, -3'sd2, -3'sd1, -3'sd1,  3'sd0},   // e = NB
    '{-3'sd2, -3'sd1, -3'sd2,  3'sd0,  3'sd1},   // e = NS
    '{-3'sd1, -3'sd1,  3'sd0,  3'sd1,  3'sd1},   // e = Z 
    '{-3'sd1,  3'sd0,  3'sd2,  3'sd1,  3'sd2},   // e = PS
    '{ 3'sd0,  3'sd1,  3'sd1,  3'sd2,  3'sd2}    // e = PB
  };

  // Consequent of rule (row r, column c) as a signed integer in half units
  function automatic int rule_at(rule_table_t t, int r, int c);
    return int'($signed(t[r][c]));
  endfunction

endpackage
