// tb_exec_timer: random start/stop patterns; the reported period is the number
// of clocks between consecutive starts and the execution time the number of
// clocks from a start to the following stop, both counted by the testbench.
module tb_exec_timer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic [31:0] period, exec_time;
  logic period_valid, exec_valid;
  int per_prev = 0;

  exec_timer dut (.clk, .rst_n, .start, .stop, .period, .period_valid, .exec_time, .exec_valid);

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int lat, per;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!period_valid && !exec_valid, "nothing valid after reset");
    for (int n = 0; n < 200; n++) begin
      lat = $urandom_range(1, 300);
      per = lat + $urandom_range(1, 500);
      start = 1;
      @(negedge clk) start = 0;
      if (n > 0) begin
        check(period_valid, "period valid");
        check(period == 32'(per_prev), $sformatf("period %0d expected %0d", period, per_prev));
      end
      repeat (lat - 1) @(negedge clk);
      stop = 1;
      @(negedge clk) stop = 0;
      check(exec_valid && exec_time == 32'(lat), $sformatf("exec time %0d expected %0d", exec_time, lat));
      repeat (per - lat - 1) @(negedge clk);
      per_prev = per;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
