// pid_flc: PD-, PI- and PID-like fuzzy speed controller for one motor.
//
// On each sample pulse:
//   e(k)  = setpoint - speed                  error
//   de(k) = e(k) - e(k-1)                     change of error
//   f(k)  = FLC(Kp*e(k), Kd*de(k))            fuzzy controller, +/-10000
// and when the fuzzy controller is done:
//   u_pd  = Kc_PD * f(k)                      PD-like action
//   acc  += Kc_PI * f(k)                      PI-like action, u_pi = acc
//   u     = u_pd (PD), u_pi (PI) or u_pd + u_pi (PID), clipped to +/-U_LIMIT
// One fuzzy controller serves both actions, as in the PID-FLC structure where
// the PI part is the running sum of the PD-FLC output; the equivalent linear
// gains are K_P = Kc_PD*Kp + Kc_PI*Kd, K_I = Kc_PI*Kp, K_D = Kc_PD*Kd.
//
// Gains are signed Q8.16 (65536 = 1.0); products are shifted right
// arithmetically (rounded toward minus infinity). The accumulator keeps the
// 16 fraction bits so that small PI increments are not lost, and is clipped to
// +/-U_LIMIT so that it cannot wind past what the driver can use (this design's
// choice). In PD mode the accumulator is held at zero, so switching to PI or
// PID starts the integral from zero. e(k-1) is zero after reset.
//
// Interface: sample starts one control step; u_valid pulses LATENCY cycles
// later (LATENCY = 43 at the default fuzzy core) with u, e_out (the error),
// f_out (the fuzzy controller output) and
// the flags valid until the next step. in_sat: the normalised error or change
// of error was clipped to +/-10000. out_sat: u was clipped.
module pid_flc
  import flc_pkg::*;
#(
  parameter int          SPEED_W = 32,
  parameter int          U_LIMIT = FULL_SCALE,
  parameter rule_table_t RULES   = RULES_PRELIM
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      sample,
  input  logic signed [SPEED_W-1:0] setpoint,
  input  logic signed [SPEED_W-1:0] speed,
  input  flc_gains_t                gains,
  input  flc_mode_e                 mode,
  output logic                      busy,
  output logic                      u_valid,
  output logic signed [15:0]        u,
  output logic signed [SPEED_W-1:0] e_out,
  output fin_t                      f_out,
  output logic                      in_sat,
  output logic                      out_sat
);
  localparam int PROD_W = SPEED_W + GAIN_W;
  localparam int ACC_W  = 16 + GAIN_FRAC + 2;
  localparam logic signed [ACC_W-1:0] ACC_LIM = ACC_W'(U_LIMIT) <<< GAIN_FRAC;

  logic signed [SPEED_W-1:0] e_q, de_q, e_prev;
  logic signed [PROD_W-1:0]  e_scaled, de_scaled;
  logic                      go, flc_busy, flc_done, sat_e, sat_de;
  fin_t                      f;
  logic signed [PROD_W-1:0]  pd_full;
  logic signed [ACC_W-1:0]   pi_inc, acc, acc_next, u_sum;
  logic signed [ACC_W-1:0]   u_pd, u_pi;

  // Control step front end: error, change of error
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q    <= '0;
      de_q   <= '0;
      e_prev <= '0;
      go     <= 1'b0;
    end else begin
      go <= 1'b0;
      if (sample && !busy) begin
        e_q    <= setpoint - speed;
        de_q   <= (setpoint - speed) - e_prev;
        e_prev <= setpoint - speed;
        go     <= 1'b1;
      end
    end
  end

  // Input scaling; the fuzzifier saturates the result to +/-10000
  always_comb begin
    e_scaled  = (PROD_W'(e_q)  * PROD_W'(gains.kp)) >>> GAIN_FRAC;
    de_scaled = (PROD_W'(de_q) * PROD_W'(gains.kd)) >>> GAIN_FRAC;
  end

  flc_core #(.RAW_W(PROD_W), .RULES(RULES)) u_flc (
    .clk, .rst_n,
    .start (go),
    .e_in  (e_scaled),
    .de_in (de_scaled),
    .busy  (flc_busy),
    .done  (flc_done),
    .y     (f),
    .sat_e (sat_e),
    .sat_de(sat_de));

  // Output scaling and accumulation
  always_comb begin
    pd_full = (PROD_W'(f) * PROD_W'(gains.kc_pd)) >>> GAIN_FRAC;
    u_pd    = ACC_W'(pd_full);
    pi_inc  = ACC_W'(PROD_W'(f) * PROD_W'(gains.kc_pi));
    acc_next = acc + pi_inc;
    if (acc_next > ACC_LIM)       acc_next = ACC_LIM;
    else if (acc_next < -ACC_LIM) acc_next = -ACC_LIM;
    u_pi = acc_next >>> GAIN_FRAC;
    unique case (mode)
      MODE_PD:  u_sum = u_pd;
      MODE_PI:  u_sum = u_pi;
      default:  u_sum = u_pd + u_pi;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      u       <= '0;
      u_valid <= 1'b0;
      in_sat  <= 1'b0;
      out_sat <= 1'b0;
      f_out   <= '0;
    end else begin
      u_valid <= 1'b0;
      if (mode == MODE_PD) acc <= '0;
      if (flc_done) begin
        if (mode != MODE_PD) acc <= acc_next;
        f_out   <= f;
        in_sat  <= sat_e | sat_de;
        u_valid <= 1'b1;
        if (u_sum > ACC_W'(U_LIMIT)) begin
          u       <= 16'(U_LIMIT);
          out_sat <= 1'b1;
        end else if (u_sum < -ACC_W'(U_LIMIT)) begin
          u       <= -16'(U_LIMIT);
          out_sat <= 1'b1;
        end else begin
          u       <= 16'(u_sum);
          out_sat <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    busy  = go | flc_busy | flc_done;
    e_out = e_q;
  end
endmodule
