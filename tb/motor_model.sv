// motor_model: behavioural model of one DC motor with its driver and optical
// quadrature encoder, for closed-loop testbenches (not synthesizable).
//
// The driver input is the servo-style pulse: its measured high time is
// mapped to a command in -1..+1 (1000 us = -1, 1500 us = 0, 2000 us = +1),
// taken at the falling edge of each pulse. The motor is first order:
// d(omega)/dt = (W_MAX * cmd - load - omega) / TAU, integrated every
// microsecond, with TAU = 0.068865 s and W_MAX = 20 rad/s at full command.
// load is a speed-equivalent disturbance in mrad/s. The shaft angle drives a
// 400-line encoder decoded x4: state count n gives Gray code 00, 01, 11, 10
// on {A, B}.
module motor_model #(
  parameter int  CLK_HZ = 40_000_000,
  parameter real TAU    = 0.068865,
  parameter real W_MAX  = 20.0,
  parameter int  LINES  = 400
) (
  input  logic               clk,
  input  logic               pwm,
  input  logic signed [31:0] load,
  output logic               enc_a,
  output logic               enc_b,
  output real                omega
);
  localparam int TPU = CLK_HZ / 1_000_000;

  real    cmd = 0.0, angle = 0.0;
  int     high = 0, tcount = 0;
  longint n;
  logic   pwm_d = 0;

  initial begin
    omega = 0.0;
    enc_a = 0;
    enc_b = 0;
  end

  always @(posedge clk) begin
    pwm_d <= pwm;
    if (pwm) high <= high + 1;
    if (pwm_d && !pwm) begin
      cmd  <= (real'(high) / real'(TPU) - 1500.0) / 500.0;
      high <= 0;
    end
    tcount <= tcount + 1;
    if (tcount == TPU - 1) begin
      tcount <= 0;
      omega  <= omega + (W_MAX * cmd - real'(load) / 1000.0 - omega) * 1.0e-6 / TAU;
      angle  <= angle + omega * 1.0e-6;
      n = longint'($floor(angle * real'(4 * LINES) / 6.283185307179586));
      case (n & 3)
        0: {enc_a, enc_b} <= 2'b00;
        1: {enc_a, enc_b} <= 2'b01;
        2: {enc_a, enc_b} <= 2'b11;
        default: {enc_a, enc_b} <= 2'b10;
      endcase
    end
  end
endmodule
