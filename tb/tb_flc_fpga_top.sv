// tb_flc_fpga_top: end-to-end closed-loop test of the two-motor controller.
//
// Two behavioural motors (first order, tau = 0.068865 s, 400-line encoders)
// are driven by the controller's pulses and feed their encoders back. The
// clock is scaled down to 1 MHz so that 10 ms control steps are 10000 clocks;
// all loop periods keep their real-time values. Phases:
//   1. PID mode, +10 rad/s on motor 0 and -10 rad/s on motor 1, preliminary
//      gains: both must settle within 0.6 rad/s of the set point.
//   2. motor 0 switched to PD mode: a steady-state error of over 1.5 rad/s
//      must appear (no integral action).
//   3. motor 0 back to PID; a load disturbance on motor 1 must be rejected.
//   4. the processor stops reading the log: records must be dropped and
//      counted, and reading must resume cleanly.
// Every control action that reaches the log is compared with the reference
// controller model fed with the set point and speed sampled at its control
// tick. Each mechanism (input saturation, output saturation, mode switch,
// both rotation directions, disturbance, log overflow) is counted and must
// occur at least once.
module tb_flc_fpga_top;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  localparam int CLK_HZ = 1_000_000;
  localparam int STEP_CLKS = CLK_HZ / 100;   // 10 ms

  int checks = 0, failures = 0;
  int n_in_sat = 0, n_out_sat = 0, n_mode_sw = 0, n_neg = 0, n_dist = 0;
  int n_overflow = 0, n_records = 0;

  logic clk = 0, rst_n = 0, loop_enable = 0, log_rd_en = 0;
  logic enc_a [2], enc_b [2], pwm [2];
  logic signed [31:0] setpoint [2], speed [2];
  flc_gains_t gains [2];
  flc_mode_e  mode [2];
  logic signed [15:0] u [2];
  logic in_sat [2], out_sat [2], enc_glitch [2];
  logic [15:0] step_count, log_dropped;
  logic [31:0] loop_period [2], exec_time [2];
  logic log_rd_valid;
  log_rec_t log_rd_rec;
  logic [5:0] log_level;
  logic signed [31:0] load [2];
  real omega [2];
  bit reading = 1;

  flc_fpga_top #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .rst_n, .loop_enable, .enc_a, .enc_b, .pwm, .setpoint, .gains, .mode,
    .speed, .u, .in_sat, .out_sat, .enc_glitch, .step_count, .loop_period, .exec_time,
    .log_rd_en, .log_rd_valid, .log_rd_rec, .log_level, .log_dropped);

  for (genvar c = 0; c < 2; c++) begin : g_motor
    motor_model #(.CLK_HZ(CLK_HZ)) u_motor (
      .clk, .pwm(pwm[c]), .load(load[c]), .enc_a(enc_a[c]), .enc_b(enc_b[c]), .omega(omega[c]));
  end

  always #5 clk = ~clk;

  initial begin
    #200_000_000;   // 20 M clocks
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  // ---- reference model run at every control tick -------------------------
  pid_state_t st [2];
  longint exp_u [2][int];

  always @(posedge clk) begin
    if (rst_n && dut.ctrl_tick) begin
      for (int c = 0; c < 2; c++) begin
        longint f;
        bit is, os;
        int key;
        key = int'(step_count) + 1;
        exp_u[c][key & 16'hffff] = pid_step(setpoint[c], speed[c], gains[c], mode[c],
                                              RULES_PRELIM, st[c], f, is, os);
      end
    end
  end

  // ---- processor side: read the log, compare each record ----------------
  always @(negedge clk) begin
    log_rd_en <= 1'b0;
    if (reading && log_rd_valid && !log_rd_en) begin
      int c, k;
      c = int'(log_rd_rec.ch);
      k = int'(log_rd_rec.step);
      n_records++;
      if (c < 2 && exp_u[c].exists(k)) begin
        check(longint'(log_rd_rec.u) == exp_u[c][k],
              $sformatf("ch%0d step %0d u=%0d expected %0d", c, k, log_rd_rec.u, exp_u[c][k]));
        check(log_rd_rec.setpoint == setpoint[c] || k < 3, "logged set point");
        exp_u[c].delete(k);
      end else begin
        check(0, $sformatf("unexpected record ch%0d step %0d", c, k));
      end
      log_rd_en <= 1'b1;
    end
  end

  // ---- mechanism counters -------------------------------------------------
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (dut.ctrl_tick && in_sat[c])  n_in_sat++;
      if (dut.ctrl_tick && out_sat[c]) n_out_sat++;
      if (dut.ctrl_tick && speed[c] < 0) n_neg++;
    end
  end

  // average measured speed of one motor over n control steps
  task automatic avg_speed(int c, int steps, output real avg);
    real acc = 0.0;
    for (int k = 0; k < steps; k++) begin
      repeat (STEP_CLKS) @(negedge clk);
      acc += real'(speed[c]);
    end
    avg = acc / steps;
  endtask

  task automatic set_mode(int c, flc_mode_e m);
    if (mode[c] != m) n_mode_sw++;
    mode[c] = m;
  endtask

  function automatic gain_t q16(real v);
    return gain_t'($rtoi(v * 65536.0 + 0.5));
  endfunction

  initial begin
    real a0, a1;
    for (int c = 0; c < 2; c++) begin
      gains[c].kp    = q16(1.0);
      gains[c].kd    = q16(0.02);
      gains[c].kc_pd = q16(1.0);
      gains[c].kc_pi = q16(0.06);
      mode[c]  = MODE_PID;
      load[c]  = 0;
      st[c].e_prev = 0;
      st[c].acc    = 0;
    end
    setpoint[0] = 10000;
    setpoint[1] = -10000;
    repeat (5) @(negedge clk);
    rst_n = 1;
    loop_enable = 1;

    // 1. PID step response
    repeat (100 * STEP_CLKS) @(negedge clk);
    avg_speed(0, 40, a0);
    avg_speed(1, 40, a1);
    $display("PID: motor0 %0.0f mrad/s, motor1 %0.0f mrad/s", a0, a1);
    check(a0 > 9400.0 && a0 < 10600.0, "motor 0 settles at +10 rad/s in PID mode");
    check(a1 > -10600.0 && a1 < -9400.0, "motor 1 settles at -10 rad/s in PID mode");

    // 2. PD mode on motor 0
    set_mode(0, MODE_PD);
    repeat (60 * STEP_CLKS) @(negedge clk);
    avg_speed(0, 40, a0);
    $display("PD: motor0 %0.0f mrad/s", a0);
    check(a0 < 8500.0 && a0 > 3000.0, "PD mode leaves a steady-state error");

    // 3. back to PID, disturbance on motor 1
    set_mode(0, MODE_PID);
    load[1] = -4000;
    n_dist++;
    repeat (20 * STEP_CLKS) @(negedge clk);
    avg_speed(1, 5, a1);
    $display("disturbed: motor1 %0.0f mrad/s", a1);
    repeat (100 * STEP_CLKS) @(negedge clk);
    avg_speed(0, 40, a0);
    avg_speed(1, 40, a1);
    $display("recovered: motor0 %0.0f motor1 %0.0f mrad/s", a0, a1);
    check(a0 > 9400.0 && a0 < 10600.0, "motor 0 returns to the set point in PID mode");
    check(a1 > -10600.0 && a1 < -9400.0, "motor 1 rejects the load disturbance");

    // 4. log overflow: stop reading for 25 steps (50 records into 32 entries)
    reading = 0;
    repeat (25 * STEP_CLKS) @(negedge clk);
    check(log_level == 32, "log full");
    check(log_dropped > 0, "dropped records counted");
    if (log_dropped > 0) n_overflow++;
    // forget the expectations of records that were dropped
    reading = 1;
    repeat (40) @(negedge clk);
    repeat (5 * STEP_CLKS) @(negedge clk);
    check(log_level <= 1, "log drained");
    check(!enc_glitch[0] && !enc_glitch[1], "no encoder glitches");

    check(n_in_sat > 0, "input saturation happened");
    check(n_out_sat > 0, "output saturation happened");
    check(n_mode_sw >= 2, "mode switches happened");
    check(n_neg > 0, "reverse rotation happened");
    check(n_dist > 0, "disturbance applied");
    check(n_overflow > 0, "log overflow happened");
    check(n_records > 500, $sformatf("records read: %0d", n_records));
    $display("mechanisms: in_sat %0d out_sat %0d mode switches %0d reverse %0d disturbance %0d overflow %0d records %0d",
             n_in_sat, n_out_sat, n_mode_sw, n_neg, n_dist, n_overflow, n_records);
    for (int c = 0; c < 2; c++) begin
      check(exec_time[c] == 43, $sformatf("control law takes %0d clocks", exec_time[c]));
      check(loop_period[c] == 32'(STEP_CLKS), $sformatf("control loop period %0d clocks", loop_period[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
