// tb_flc_fpga_top_full: the controller at its default parameters (40 MHz
// clock, 10 ms control loop, 8 ms encoder window, 20 ms pulse period, two
// motors) through one complete operation: a step of the set points to
// +10 rad/s and -10 rad/s in PID mode with the preliminary scaling constants,
// closed through two behavioural motors, for 0.9 s of real time (90 control
// steps, 36 M clocks). Checked: every logged control action against the
// reference controller model, every generated pulse width against
// 60000 + 2*u clocks (1500 us + u * 500 us / 10000), and that both motors
// end within 0.6 rad/s of their set points.
module tb_flc_fpga_top_full;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  localparam int STEP_CLKS = 400_000;   // 10 ms at 40 MHz

  int checks = 0, failures = 0, n_pulses = 0, n_records = 0;

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

  flc_fpga_top dut (
    .clk, .rst_n, .loop_enable, .enc_a, .enc_b, .pwm, .setpoint, .gains, .mode,
    .speed, .u, .in_sat, .out_sat, .enc_glitch, .step_count, .loop_period, .exec_time,
    .log_rd_en, .log_rd_valid, .log_rd_rec, .log_level, .log_dropped);

  for (genvar c = 0; c < 2; c++) begin : g_motor
    motor_model u_motor (
      .clk, .pwm(pwm[c]), .load(load[c]), .enc_a(enc_a[c]), .enc_b(enc_b[c]), .omega(omega[c]));
  end

  always #12.5 clk = ~clk;

  initial begin
    #1_500_000_000;   // 60 M clocks
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

  pid_state_t st [2];
  longint exp_u [2][int];

  always @(posedge clk) begin
    if (rst_n && dut.ctrl_tick)
      for (int c = 0; c < 2; c++) begin
        longint f;
        bit is, os;
        exp_u[c][(int'(step_count) + 1) & 16'hffff] =
          pid_step(setpoint[c], speed[c], gains[c], mode[c], RULES_PRELIM, st[c], f, is, os);
      end
  end

  always @(negedge clk) begin
    log_rd_en <= 1'b0;
    if (log_rd_valid && !log_rd_en) begin
      int c, k;
      c = int'(log_rd_rec.ch);
      k = int'(log_rd_rec.step);
      n_records++;
      check(c < 2 && exp_u[c].exists(k), $sformatf("record ch%0d step %0d expected", c, k));
      if (c < 2 && exp_u[c].exists(k)) begin
        check(longint'(log_rd_rec.u) == exp_u[c][k],
              $sformatf("ch%0d step %0d u=%0d expected %0d", c, k, log_rd_rec.u, exp_u[c][k]));
        exp_u[c].delete(k);
      end
      log_rd_en <= 1'b1;
    end
  end

  // pulse width check: a pulse started at the clock edge before this negedge
  // carries the control action seen at the previous negedge
  logic pwm_prev [2];
  logic signed [15:0] u_prev [2];
  int high [2], exp_high [2];
  always @(negedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (pwm[c] && !pwm_prev[c]) begin
        high[c] = 0;
        exp_high[c] = 60000 + 2 * int'(u_prev[c]);
      end
      if (pwm[c]) high[c]++;
      if (!pwm[c] && pwm_prev[c] && rst_n) begin
        n_pulses++;
        check(high[c] == exp_high[c] || n_pulses <= 2,
              $sformatf("ch%0d pulse %0d clocks, expected %0d", c, high[c], exp_high[c]));
      end
      pwm_prev[c] = pwm[c];
      u_prev[c]   = u[c];
    end
  end

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
      pwm_prev[c] = 0;
      u_prev[c]   = 0;
      high[c]     = 0;
      exp_high[c] = 0;
    end
    setpoint[0] = 10000;
    setpoint[1] = -10000;
    repeat (5) @(negedge clk);
    rst_n = 1;
    loop_enable = 1;
    repeat (70 * STEP_CLKS) @(negedge clk);
    a0 = 0.0;
    a1 = 0.0;
    for (int k = 0; k < 20; k++) begin
      repeat (STEP_CLKS) @(negedge clk);
      a0 += real'(speed[0]) / 20.0;
      a1 += real'(speed[1]) / 20.0;
    end
    $display("after 0.9 s: motor0 %0.0f mrad/s, motor1 %0.0f mrad/s", a0, a1);
    check(a0 > 9400.0 && a0 < 10600.0, "motor 0 at +10 rad/s");
    check(a1 > -10600.0 && a1 < -9400.0, "motor 1 at -10 rad/s");
    check(n_records >= 170, $sformatf("records read: %0d", n_records));
    check(n_pulses >= 80, $sformatf("pulses checked: %0d", n_pulses));
    check(log_dropped == 0, "no log records lost");
    for (int c = 0; c < 2; c++) begin
      check(exec_time[c] == 43, $sformatf("control law takes %0d clocks", exec_time[c]));
      check(loop_period[c] == 32'(STEP_CLKS), $sformatf("control loop period %0d clocks", loop_period[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
