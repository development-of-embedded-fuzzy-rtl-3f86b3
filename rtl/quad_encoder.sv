// quad_encoder: measuring loop for one motor's optical quadrature encoder.
//
// The A and B channels are synchronised with two flip-flops each, then every
// change of the AB state is decoded into +1 or -1 count (4 counts per encoder
// line: 400 lines give 1600 counts per revolution). A state change in both
// channels at once cannot be given a direction; it is not counted and sets the
// sticky glitch flag. A leading B counts up.
//
// Every WINDOW_US microseconds the counts gained in the window are turned into
// an angular velocity in mrad/s: speed = delta * K, with
// K = 2*pi*1e9 / (4 * PULSES_PER_REV * WINDOW_US) held as a Q16 constant
// (490.87 mrad/s per count for 400 lines and an 8 ms window). speed_valid
// pulses for one clock with each new value; speed holds between windows.
// position is the running count since reset.
module quad_encoder #(
  parameter int CLK_HZ         = 40_000_000,
  parameter int WINDOW_US      = 8000,
  parameter int PULSES_PER_REV = 400,
  parameter int SPEED_W        = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      enc_a,
  input  logic                      enc_b,
  output logic signed [31:0]        position,
  output logic signed [SPEED_W-1:0] speed,
  output logic                      speed_valid,
  output logic                      glitch
);
  localparam int  WINDOW_CLKS = (CLK_HZ / 1_000_000) * WINDOW_US;
  localparam int  CPR         = 4 * PULSES_PER_REV;
  localparam real TWO_PI      = 6.283185307179586;
  localparam longint K_Q16    =
      longint'(TWO_PI * 1.0e9 * 65536.0 / (real'(CPR) * real'(WINDOW_US)));
  localparam int  CW          = $clog2(WINDOW_CLKS + 1);

  logic [1:0]         a_sync, b_sync;
  logic [1:0]         ab_prev, ab_now;
  logic signed [1:0]  step;
  logic               both;
  logic [CW-1:0]      win_count;
  logic signed [31:0] pos_last, delta;
  logic signed [63:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sync  <= '0;
      b_sync  <= '0;
      ab_prev <= '0;
    end else begin
      a_sync  <= {a_sync[0], enc_a};
      b_sync  <= {b_sync[0], enc_b};
      ab_prev <= ab_now;
    end
  end

  // Gray-code state sequence 00 -> 01 -> 11 -> 10 -> 00 counts up
  always_comb begin
    ab_now = {a_sync[1], b_sync[1]};
    step   = '0;
    both   = 1'b0;
    unique case ({ab_prev, ab_now})
      4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: step = 2'sd1;
      4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: step = -2'sd1;
      4'b00_11, 4'b11_00, 4'b01_10, 4'b10_01: both = 1'b1;
      default: step = '0;
    endcase
  end

  always_comb begin
    delta = position - pos_last;
    prod  = 64'(delta) * K_Q16;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      position    <= '0;
      pos_last    <= '0;
      win_count   <= '0;
      speed       <= '0;
      speed_valid <= 1'b0;
      glitch      <= 1'b0;
    end else begin
      speed_valid <= 1'b0;
      position    <= position + 32'(step);
      if (both) glitch <= 1'b1;
      if (win_count == CW'(WINDOW_CLKS - 1)) begin
        win_count   <= '0;
        pos_last    <= position;
        speed       <= SPEED_W'(prod >>> 16);
        speed_valid <= 1'b1;
      end else begin
        win_count <= win_count + 1'b1;
      end
    end
  end
endmodule
