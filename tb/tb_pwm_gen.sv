// tb_pwm_gen: measures the high time and the period of the generated pulses
// for several control actions, at a 1 MHz clock (1 clock = 1 us): -10000 ->
// 1000 us, 0 -> 1500 us, 5000 -> 1750 us, 10000 -> 2000 us, values beyond
// +/-10000 clip to the +/-500 us limits, period 20000 us.
module tb_pwm_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] u;
  logic pwm, period_start;
  logic [31:0] width_ticks;

  pwm_gen #(.CLK_HZ(1_000_000)) dut (.clk, .rst_n, .u, .pwm, .width_ticks, .period_start);

  always #5 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // set u, let one full period pass, then measure the next
  task automatic measure(int uval, int exp_high);
    int high, total;
    u = 16'(uval);
    @(posedge period_start);
    @(posedge period_start);
    high = 0;
    total = 0;
    // the period_start pulse is still high at this edge; count until the next
    @(negedge clk);
    do begin
      if (pwm) high++;
      total++;
      @(negedge clk);
    end while (!period_start);
    check(high, exp_high, $sformatf("high time for u=%0d", uval));
    check(total, 20000, "period");
  endtask

  initial begin
    u = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    measure(0, 1500);
    measure(-10000, 1000);
    measure(10000, 2000);
    measure(5000, 1750);
    measure(-2000, 1400);
    measure(15000, 2000);
    measure(-32000, 1000);
    measure(1, 1500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
