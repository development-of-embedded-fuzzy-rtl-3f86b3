// tb_workloads: the evaluated configurations, run closed loop against
// behavioural motors at a 1 MHz clock (loop periods keep their real-time
// values), all at once:
//   lr10/lr20/lr50  one motor, PID mode, preliminary rules and constants,
//                   control loop at 10, 20 and 50 ms: step to 10 rad/s
//   opt2            optimised rule table, preliminary constants (10 ms)
//   opt3            optimised rule table and constants Kc_PD = 1.0667,
//                   Kc_PI = 1.6956, Kp = 1, Kd = 0.001 (10 ms). These were
//                   tuned on real motors whose gain and control-action
//                   scaling differ from the model here; against this model
//                   they give a sustained oscillation, so only reaching the
//                   set point and staying within the motor's range is checked
//   trk             two motors following the wheel speeds of a half-circle
//                   path (radius 0.5 m, 6 s, smooth start and stop; wheel
//                   radius 0.05 m, half track 0.2 m - this test's own numbers)
// For each step response the cost J = overshoot + RMS error over the first
// 2 s (rad/s) is reported; the 10 ms loop must do better than the 50 ms one,
// every configuration with the preliminary constants must end within
// 0.6 rad/s of its set point, and the
// tracking motors must stay within 1.5 rad/s RMS of their references with
// wheel angles within 5 % of the reference angles.
module tb_workloads;
  import flc_pkg::*;

  localparam int CLK_HZ = 1_000_000;
  localparam int NSTEP  = 5;       // step-response configurations
  localparam real R_PATH = 0.5, R_WHEEL = 0.05, HALF_TRACK = 0.2, T_PATH = 6.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;

  always #5 clk = ~clk;

  initial begin
    #100_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic gain_t q16(real v);
    return gain_t'($rtoi(v * 65536.0 + 0.5));
  endfunction

  flc_gains_t g_pre, g_opt;
  initial begin
    g_pre.kp = q16(1.0);   g_pre.kd = q16(0.02);  g_pre.kc_pd = q16(1.0);    g_pre.kc_pi = q16(0.06);
    g_opt.kp = q16(1.0);   g_opt.kd = q16(0.001); g_opt.kc_pd = q16(1.0667); g_opt.kc_pi = q16(1.6956);
  end

  // ---- step-response configurations ---------------------------------------
  logic signed [31:0] sp_step [1];
  logic signed [31:0] spd [NSTEP][1];
  real omega_s [NSTEP];
  initial sp_step[0] = 10000;

  `define STEP_DUT(IDX, LOOP, RULESET, GAINS)                                   \
    logic ea_``IDX [1], eb_``IDX [1], pw_``IDX [1];                             \
    flc_gains_t gn_``IDX [1];                                                   \
    flc_mode_e  md_``IDX [1];                                                   \
    logic signed [31:0] ld_``IDX;                                               \
    assign gn_``IDX[0] = GAINS;                                                 \
    assign md_``IDX[0] = MODE_PID;                                              \
    assign ld_``IDX = 0;                                                        \
    flc_fpga_top #(.NCH(1), .CLK_HZ(CLK_HZ), .LOOP_US(LOOP), .RULES(RULESET))   \
      dut_``IDX (.clk, .rst_n, .loop_enable(en), .enc_a(ea_``IDX), .enc_b(eb_``IDX), \
        .pwm(pw_``IDX), .setpoint(sp_step), .gains(gn_``IDX), .mode(md_``IDX),  \
        .speed(spd[IDX]), .u(), .in_sat(), .out_sat(), .enc_glitch(),           \
        .step_count(), .loop_period(), .exec_time(), .log_rd_en(1'b1),          \
        .log_rd_valid(), .log_rd_rec(), .log_level(), .log_dropped());          \
    motor_model #(.CLK_HZ(CLK_HZ)) mot_``IDX (.clk, .pwm(pw_``IDX[0]),          \
      .load(ld_``IDX), .enc_a(ea_``IDX[0]), .enc_b(eb_``IDX[0]), .omega(omega_s[IDX]));

  `STEP_DUT(0, 10000, RULES_PRELIM, g_pre)
  `STEP_DUT(1, 20000, RULES_PRELIM, g_pre)
  `STEP_DUT(2, 50000, RULES_PRELIM, g_pre)
  `STEP_DUT(3, 10000, RULES_OPTIMIZED, g_pre)
  `STEP_DUT(4, 10000, RULES_OPTIMIZED, g_opt)

  // ---- two-motor tracking ---------------------------------------------------
  logic ea_t [2], eb_t [2], pw_t [2];
  logic signed [31:0] sp_t [2], spd_t [2], ld_t;
  flc_gains_t gn_t [2];
  flc_mode_e  md_t [2];
  real omega_t [2];
  assign ld_t = 0;
  assign gn_t[0] = g_pre;
  assign gn_t[1] = g_pre;
  assign md_t[0] = MODE_PID;
  assign md_t[1] = MODE_PID;

  flc_fpga_top #(.NCH(2), .CLK_HZ(CLK_HZ)) dut_trk (
    .clk, .rst_n, .loop_enable(en), .enc_a(ea_t), .enc_b(eb_t), .pwm(pw_t),
    .setpoint(sp_t), .gains(gn_t), .mode(md_t), .speed(spd_t), .u(), .in_sat(),
    .out_sat(), .enc_glitch(), .step_count(), .loop_period(), .exec_time(),
    .log_rd_en(1'b1), .log_rd_valid(), .log_rd_rec(), .log_level(), .log_dropped());

  for (genvar c = 0; c < 2; c++) begin : g_trk_motor
    motor_model #(.CLK_HZ(CLK_HZ)) mot (.clk, .pwm(pw_t[c]), .load(ld_t),
      .enc_a(ea_t[c]), .enc_b(eb_t[c]), .omega(omega_t[c]));
  end

  // quintic heading profile psi(t): 0 -> pi with zero rate and acceleration at both ends
  function automatic real psi_dot(real t);
    real s;
    if (t <= 0.0 || t >= T_PATH) return 0.0;
    s = t / T_PATH;
    return 3.141592653589793 * 30.0 * s * s * (1.0 - s) * (1.0 - s) / T_PATH;
  endfunction

  // ---- stimulus and measurement ---------------------------------------------
  real sq_err [NSTEP], peak [NSTEP];
  real trk_sq [2], ang_ref [2], ang_act [2];
  int  n_err = 0, n_trk = 0;

  initial begin
    real t, w, v, cost [NSTEP], rms;
    for (int i = 0; i < NSTEP; i++) begin
      sq_err[i] = 0.0;
      peak[i]   = 0.0;
    end
    for (int c = 0; c < 2; c++) begin
      trk_sq[c] = 0.0;
      ang_ref[c] = 0.0;
      ang_act[c] = 0.0;
    end
    sp_t[0] = 0;
    sp_t[1] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    en = 1;
    // 8 s of real time in 1 ms slices
    for (int ms = 0; ms < 8000; ms++) begin
      repeat (CLK_HZ / 1000) @(negedge clk);
      t = real'(ms) / 1000.0;
      for (int i = 0; i < NSTEP; i++) begin
        if (ms < 2000) sq_err[i] += (10.0 - omega_s[i]) ** 2;
        if (omega_s[i] > peak[i]) peak[i] = omega_s[i];
      end
      if (ms < 2000) n_err++;
      // tracking references from t = 0.5 s
      w = psi_dot(t - 0.5);
      v = R_PATH * w;
      sp_t[0] = $rtoi(1000.0 * (v + HALF_TRACK * w) / R_WHEEL);   // right wheel
      sp_t[1] = $rtoi(1000.0 * (v - HALF_TRACK * w) / R_WHEEL);   // left wheel
      for (int c = 0; c < 2; c++) begin
        ang_ref[c] += real'(sp_t[c]) / 1.0e6;
        ang_act[c] += omega_t[c] / 1000.0;
        trk_sq[c]  += (real'(sp_t[c]) / 1000.0 - omega_t[c]) ** 2;
      end
      n_trk++;
    end
    for (int i = 0; i < NSTEP; i++) begin
      cost[i] = ((peak[i] > 10.0) ? peak[i] - 10.0 : 0.0) + $sqrt(sq_err[i] / n_err);
      $display("config %0d: overshoot %0.2f rad/s, J = %0.3f, final speed %0d mrad/s",
               i, (peak[i] > 10.0) ? peak[i] - 10.0 : 0.0, cost[i], spd[i][0]);
      if (i < 4)
        check(spd[i][0] > 9400 && spd[i][0] < 10600, $sformatf("config %0d ends at the set point", i));
      else   // constants tuned on other motors: only boundedness is required
        check(peak[i] < 21.0 && peak[i] > 10.0, $sformatf("config %0d stays within the motor's range", i));
    end
    check(cost[0] < cost[2], "10 ms loop performs better than 50 ms");
    for (int c = 0; c < 2; c++) begin
      rms = $sqrt(trk_sq[c] / n_trk);
      $display("tracking motor %0d: RMS speed error %0.3f rad/s, angle %0.2f of %0.2f rad",
               c, rms, ang_act[c], ang_ref[c]);
      check(rms < 1.5, $sformatf("motor %0d tracks its reference", c));
      check(ang_act[c] > 0.95 * ang_ref[c] && ang_act[c] < 1.05 * ang_ref[c],
            $sformatf("motor %0d wheel angle", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
