// tb_pid_flc: a sequence of control steps with varying set points and speeds
// in PD, PI and PID mode (with switches between them), compared step by step
// with the reference controller model: u, the fuzzy output, the error and the
// saturation flags. Gains are the preliminary ones (Kp = 1, Kd = 0.02,
// Kc_PD = 1, Kc_PI = 0.06) and then the optimised ones. Also checks the
// 43-cycle latency from sample to u_valid and that both saturations occur.
module tb_pid_flc;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  localparam int LATENCY = 43;

  int checks = 0, failures = 0;
  int n_in_sat = 0, n_out_sat = 0, n_mode_sw = 0;
  logic clk = 0, rst_n = 0, sample = 0;
  logic signed [31:0] setpoint, speed, e_out;
  flc_gains_t gains;
  flc_mode_e  mode;
  logic busy, u_valid, in_sat, out_sat;
  logic signed [15:0] u;
  fin_t f_out;
  pid_state_t st;

  pid_flc dut (.clk, .rst_n, .sample, .setpoint, .speed, .gains, .mode,
               .busy, .u_valid, .u, .e_out, .f_out, .in_sat, .out_sat);

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s sp=%0d y=%0d got %0d exp %0d", what, setpoint, speed, got, exp);
    end
  endtask

  function automatic gain_t q16(real v);
    return gain_t'($rtoi(v * 65536.0 + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  task automatic step(longint sp, longint y, flc_mode_e m);
    longint exp_u, exp_f;
    bit exp_in_sat, exp_out_sat;
    int cyc;
    if (m != mode) n_mode_sw++;
    setpoint = 32'(sp);
    speed    = 32'(y);
    mode     = m;
    exp_u = pid_step(sp, y, gains, m, RULES_PRELIM, st, exp_f, exp_in_sat, exp_out_sat);
    @(negedge clk) sample = 1;
    @(negedge clk) sample = 0;
    cyc = 1;
    while (!u_valid) begin
      @(negedge clk);
      cyc++;
    end
    check(u, exp_u, "u");
    check(f_out, exp_f, "f");
    check(e_out, sp - y, "e");
    check(in_sat, exp_in_sat, "in_sat");
    check(out_sat, exp_out_sat, "out_sat");
    check(cyc, LATENCY, "latency");
    if (in_sat) n_in_sat++;
    if (out_sat) n_out_sat++;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    setpoint = '0;
    speed    = '0;
    mode     = MODE_PID;
    st.e_prev = 0;
    st.acc    = 0;
    gains.kp    = q16(1.0);
    gains.kd    = q16(0.02);
    gains.kc_pd = q16(1.0);
    gains.kc_pi = q16(0.06);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // a first-order speed response to a 10 rad/s step, PID mode
    for (int k = 0; k < 40; k++) step(10000, 10000 - 10000 * (39 - k) / 39, MODE_PID);
    // PD mode clears the integral
    for (int k = 0; k < 10; k++) step(10000, 6000 + 100 * k, MODE_PD);
    // PI mode, reverse direction with overshoot
    for (int k = 0; k < 20; k++) step(-10000, 2000 - 700 * k, MODE_PI);
    // random steps in random modes
    for (int k = 0; k < 200; k++)
      step(longint'($urandom_range(0, 40000)) - 20000, longint'($urandom_range(0, 40000)) - 20000,
           flc_mode_e'($urandom_range(0, 2)));
    // optimised scaling constants
    gains.kc_pd = q16(1.0667);
    gains.kc_pi = q16(1.6956);
    gains.kd    = q16(0.0010);
    for (int k = 0; k < 100; k++)
      step(longint'($urandom_range(0, 30000)) - 15000, longint'($urandom_range(0, 30000)) - 15000, MODE_PID);
    checks++;
    if (n_in_sat == 0 || n_out_sat == 0 || n_mode_sw == 0) begin
      failures++;
      $display("FAIL mechanisms not seen: in_sat %0d out_sat %0d mode switches %0d", n_in_sat, n_out_sat, n_mode_sw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
