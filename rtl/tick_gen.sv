// tick_gen: loop-rate timer. Pulses tick for one clock every PERIOD clocks,
// the first pulse PERIOD clocks after reset (or after enable rises).
module tick_gen #(
  parameter int PERIOD = 400_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic tick
);
  localparam int CW = $clog2(PERIOD + 1);
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (!enable) begin
        count <= '0;
      end else if (count == CW'(PERIOD - 1)) begin
        count <= '0;
        tick  <= 1'b1;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
