// weighted_avg: crisp output of the zero-order Sugeno controller.
//
// On start the five row sums are added into NUM = sum(w*z) (z in half units)
// and DEN = sum(w). The output is y = NUM * (FULL_SCALE/2) / DEN, i.e. the
// weighted average of the rule consequents in the 10000 = 1.0 scale,
// truncated toward zero. The division is done on magnitudes by a sequential
// divider with constant latency; the sign is applied afterwards. A zero DEN
// (no rule fires, which cannot happen for saturated inputs and the default
// triangular sets) gives y = 0.
//
// Timing: start in cycle 0, done pulses in cycle DIV_W + 2 with y valid; y
// holds until the next result. start while busy is ignored.
module weighted_avg
  import flc_pkg::*;
#(
  parameter int ROW_NUM_W = 20,
  parameter int ROW_DEN_W = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic signed [ROW_NUM_W-1:0] row_num [NUM_MF],
  input  logic        [ROW_DEN_W-1:0] row_den [NUM_MF],
  output logic                        busy,
  output logic                        done,
  output fin_t                        y
);
  localparam int NUM_W = ROW_NUM_W + 3;
  localparam int DEN_W = ROW_DEN_W + 3;
  localparam int DIV_W = NUM_W + 14;   // |NUM| * 5000 fits here

  logic signed [NUM_W-1:0] num_sum;
  logic        [DEN_W-1:0] den_sum;
  logic                    neg_q, zero_q, div_start, div_busy, div_done;
  logic [DIV_W-1:0]        dividend_q, quotient;
  logic [DEN_W-1:0]        divisor_q, remainder;

  always_comb begin
    num_sum = '0;
    den_sum = '0;
    for (int r = 0; r < NUM_MF; r++) begin
      num_sum += NUM_W'(row_num[r]);
      den_sum += DEN_W'(row_den[r]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg_q      <= 1'b0;
      zero_q     <= 1'b0;
      div_start  <= 1'b0;
      dividend_q <= '0;
      divisor_q  <= '0;
    end else begin
      div_start <= 1'b0;
      if (start && !busy) begin
        neg_q      <= num_sum < 0;
        zero_q     <= den_sum == '0;
        dividend_q <= DIV_W'(num_sum < 0 ? -num_sum : num_sum) * DIV_W'(FULL_SCALE / 2);
        divisor_q  <= den_sum;
        div_start  <= 1'b1;
      end
    end
  end

  seq_divider #(.N_W(DIV_W), .D_W(DEN_W)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (dividend_q),
    .divisor  (divisor_q),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quotient),
    .remainder(remainder)
  );

  always_comb busy = div_start | div_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y    <= '0;
      done <= 1'b0;
    end else begin
      done <= div_done;
      if (div_done) begin
        if (zero_q)     y <= '0;
        else if (neg_q) y <= -fin_t'(quotient);
        else            y <= fin_t'(quotient);
      end
    end
  end
endmodule
