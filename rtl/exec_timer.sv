// exec_timer: execution-time meter for one loop.
//
// Counts clocks continuously. On each start pulse it records the clocks
// since the previous start (the loop iteration period, the quantity used to
// measure loop rates) and on each stop pulse the clocks since the last start
// (the execution time of the computation the loop performs). Both results
// hold until replaced; valid bits say that a result exists. The counters
// saturate instead of wrapping. It runs beside the measured loop and does not
// change its timing.
module exec_timer #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         stop,
  output logic [W-1:0] period,
  output logic         period_valid,
  output logic [W-1:0] exec_time,
  output logic         exec_valid
);
  logic [W-1:0] since_start;
  logic         started;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since_start  <= '0;
      started      <= 1'b0;
      period       <= '0;
      period_valid <= 1'b0;
      exec_time    <= '0;
      exec_valid   <= 1'b0;
    end else begin
      if (start) begin
        since_start <= W'(1);
        started     <= 1'b1;
        if (started) begin
          period       <= since_start;
          period_valid <= 1'b1;
        end
      end else if (since_start != '1) begin
        since_start <= since_start + 1'b1;
      end
      if (stop && started && !start) begin
        exec_time  <= since_start;
        exec_valid <= 1'b1;
      end
    end
  end
endmodule
