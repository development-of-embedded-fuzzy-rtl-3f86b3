// flc_fpga_top: stand-alone embedded fuzzy speed controller for NCH DC motors.
//
// Each motor channel runs three independent loops in parallel, each at its own
// rate, as separate hardware:
//   measuring loop  quad_encoder   encoder counts -> speed every ENC_WINDOW_US
//   control loop    pid_flc        PID-like fuzzy control law every LOOP_US,
//                                  using the latest measured speed
//   driving loop    pwm_gen        1000..2000 us pulse every PWM_PERIOD_US,
//                                  using the latest control action
// An exec_timer per motor measures the control loop's iteration period and the
// clocks the control law takes, the way loop rates are measured on the target.
// A fourth loop, data_logger, collects one record per motor per control step
// for the real-time processor, which reads it through the log_* port. The
// processor side also supplies the set points, the scaling gains and the
// controller structure (PD, PI or PID) of each motor; they are plain inputs
// here and are sampled at every control step.
//
// Defaults: 40 MHz clock, 10 ms control loop, 8 ms encoder window, 400-line
// encoders, two motors (a differential-drive robot), preliminary rule table.
// The 20 ms pulse repetition period and the 32-entry log are this design's
// choices. Speeds are in mrad/s; u is in the fuzzy scale, 10000 = the driver's
// full +/-500 us range.
//
// Timing: the control action of a step is ready 43 clocks after the control
// tick and is applied at the start of the next PWM period.
module flc_fpga_top
  import flc_pkg::*;
#(
  parameter int          NCH            = 2,
  parameter int          CLK_HZ         = 40_000_000,
  parameter int          LOOP_US        = 10_000,
  parameter int          ENC_WINDOW_US  = 8000,
  parameter int          PULSES_PER_REV = 400,
  parameter int          PWM_PERIOD_US  = 20_000,
  parameter int          LOG_DEPTH      = 32,
  parameter rule_table_t RULES          = RULES_PRELIM
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                loop_enable,
  // motor side
  input  logic                enc_a   [NCH],
  input  logic                enc_b   [NCH],
  output logic                pwm     [NCH],
  // processor side: commands
  input  logic signed [31:0]  setpoint [NCH],
  input  flc_gains_t          gains    [NCH],
  input  flc_mode_e           mode     [NCH],
  // processor side: status
  output logic signed [31:0]  speed    [NCH],
  output logic signed [15:0]  u        [NCH],
  output logic                in_sat   [NCH],
  output logic                out_sat  [NCH],
  output logic                enc_glitch [NCH],
  output logic [15:0]         step_count,
  output logic [31:0]         loop_period [NCH],   // clocks between control steps
  output logic [31:0]         exec_time   [NCH],   // clocks from tick to control action
  // processor side: data log
  input  logic                log_rd_en,
  output logic                log_rd_valid,
  output log_rec_t            log_rd_rec,
  output logic [$clog2(LOG_DEPTH+1)-1:0] log_level,
  output logic [15:0]         log_dropped
);
  localparam int LOOP_CLKS = (CLK_HZ / 1_000_000) * LOOP_US;

  logic           ctrl_tick;
  logic [NCH-1:0] log_req;
  log_rec_t       log_rec [NCH];

  tick_gen #(.PERIOD(LOOP_CLKS)) u_loop_timer (
    .clk, .rst_n, .enable(loop_enable), .tick(ctrl_tick));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         step_count <= '0;
    else if (ctrl_tick) step_count <= step_count + 1'b1;
  end

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic signed [31:0] position, e;
    logic               speed_valid, busy, u_valid, period_start;
    logic [31:0]        width_ticks;
    fin_t               f;

    quad_encoder #(
      .CLK_HZ(CLK_HZ), .WINDOW_US(ENC_WINDOW_US), .PULSES_PER_REV(PULSES_PER_REV)
    ) u_enc (
      .clk, .rst_n,
      .enc_a      (enc_a[c]),
      .enc_b      (enc_b[c]),
      .position   (position),
      .speed      (speed[c]),
      .speed_valid(speed_valid),
      .glitch     (enc_glitch[c]));

    pid_flc #(.RULES(RULES)) u_ctrl (
      .clk, .rst_n,
      .sample  (ctrl_tick),
      .setpoint(setpoint[c]),
      .speed   (speed[c]),
      .gains   (gains[c]),
      .mode    (mode[c]),
      .busy    (busy),
      .u_valid (u_valid),
      .u       (u[c]),
      .e_out   (e),
      .f_out   (f),
      .in_sat  (in_sat[c]),
      .out_sat (out_sat[c]));

    exec_timer u_timer (
      .clk, .rst_n,
      .start       (ctrl_tick),
      .stop        (u_valid),
      .period      (loop_period[c]),
      .period_valid(),
      .exec_time   (exec_time[c]),
      .exec_valid  ());

    pwm_gen #(.CLK_HZ(CLK_HZ), .PERIOD_US(PWM_PERIOD_US)) u_pwm (
      .clk, .rst_n,
      .u           (u[c]),
      .pwm         (pwm[c]),
      .width_ticks (width_ticks),
      .period_start(period_start));

    always_comb begin
      log_req[c]          = u_valid;
      log_rec[c].ch       = 4'(c);
      log_rec[c].step     = step_count;
      log_rec[c].setpoint = setpoint[c];
      log_rec[c].speed    = speed[c];
      log_rec[c].u        = u[c];
    end
  end

  data_logger #(.NCH(NCH), .DEPTH(LOG_DEPTH)) u_log (
    .clk, .rst_n,
    .wr_req  (log_req),
    .wr_rec  (log_rec),
    .rd_en   (log_rd_en),
    .rd_valid(log_rd_valid),
    .rd_rec  (log_rd_rec),
    .level   (log_level),
    .dropped (log_dropped));
endmodule
