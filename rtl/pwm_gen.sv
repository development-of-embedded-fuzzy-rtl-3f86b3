// pwm_gen: driving loop, servo-style pulse train for one motor driver.
//
// Every PERIOD_US a pulse is started whose high time is
//   CENTER_US + u * DEV_US / 10000   microseconds (rounded to a clock),
// so u = -10000 gives 1000 us (full speed counter-clockwise), u = 0 gives
// 1500 us (stop) and u = +10000 gives 2000 us (full speed clockwise); u outside
// +/-10000 is clipped to the +/-500 us saturation of the driver. The pulse
// width, centre and limits follow the published driver; the 20 ms repetition
// period is this design's choice.
//
// u is sampled at the start of each period, so a new control action never
// cuts a pulse short. width_ticks shows the high time, in clocks, of the pulse
// being generated; period_start pulses with each new period.
module pwm_gen
  import flc_pkg::*;
#(
  parameter int CLK_HZ    = 40_000_000,
  parameter int PERIOD_US = 20_000,
  parameter int CENTER_US = 1500,
  parameter int DEV_US    = 500
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic signed [15:0] u,
  output logic        pwm,
  output logic [31:0] width_ticks,
  output logic        period_start
);
  localparam int TPU          = CLK_HZ / 1_000_000;   // clocks per microsecond
  localparam int PERIOD_CLKS  = TPU * PERIOD_US;
  localparam int CENTER_CLKS  = TPU * CENTER_US;
  localparam int DEV_CLKS     = TPU * DEV_US;
  localparam longint K_Q16    = (longint'(DEV_CLKS) * 65536 + FULL_SCALE / 2) / longint'(FULL_SCALE);
  localparam int CW           = $clog2(PERIOD_CLKS + 1);

  logic [CW-1:0]      count;
  logic signed [15:0] u_clip;
  logic        [15:0] u_mag;
  logic        [47:0] off_mag;
  logic signed [47:0] offset;

  always_comb begin
    if (u > 16'sd10000)       u_clip = 16'sd10000;
    else if (u < -16'sd10000) u_clip = -16'sd10000;
    else                      u_clip = u;
    // offset = u * DEV_CLKS / 10000, rounded to the nearest clock, symmetric in u
    u_mag   = (u_clip < 0) ? 16'(-u_clip) : 16'(u_clip);
    off_mag = (48'(u_mag) * 48'(K_Q16) + 48'd32768) >> 16;
    offset  = (u_clip < 0) ? -$signed(off_mag) : $signed(off_mag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count        <= '0;
      width_ticks  <= 32'(CENTER_CLKS);
      period_start <= 1'b0;
      pwm          <= 1'b0;
    end else begin
      period_start <= 1'b0;
      if (count == CW'(PERIOD_CLKS - 1)) begin
        count        <= '0;
        width_ticks  <= 32'(CENTER_CLKS + 32'(offset));
        period_start <= 1'b1;
      end else begin
        count <= count + 1'b1;
      end
      // high for width_ticks clocks from the start of the period
      pwm <= (count == CW'(PERIOD_CLKS - 1)) ? 1'b1 : (32'(count) + 32'd1 < width_ticks);
    end
  end
endmodule
