// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// start loads dividend and divisor; N_W clocks later done pulses for one cycle
// with quotient and remainder valid (they hold until the next start). A zero
// divisor returns an all-ones quotient, which the caller is expected to catch.
// The latency is constant, independent of the operands.
module seq_divider #(
  parameter int N_W = 32,   // dividend and quotient width
  parameter int D_W = 18    // divisor and remainder width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] dividend,
  input  logic [D_W-1:0] divisor,
  output logic           busy,
  output logic           done,
  output logic [N_W-1:0] quotient,
  output logic [D_W-1:0] remainder
);
  localparam int CNT_W = $clog2(N_W + 1);

  logic [CNT_W-1:0] count;
  logic [D_W-1:0]   dsr;
  logic [D_W:0]     trial;

  always_comb trial = {remainder, quotient[N_W-1]} - {1'b0, dsr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
      dsr       <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        quotient  <= dividend;
        remainder <= '0;
        dsr       <= divisor;
        count     <= CNT_W'(N_W);
        busy      <= 1'b1;
      end else if (busy) begin
        // shift the next dividend bit into the partial remainder
        if (!trial[D_W]) begin
          remainder <= trial[D_W-1:0];
          quotient  <= {quotient[N_W-2:0], 1'b1};
        end else begin
          remainder <= {remainder[D_W-2:0], quotient[N_W-1]};
          quotient  <= {quotient[N_W-2:0], 1'b0};
        end
        count <= count - 1'b1;
        if (count == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
