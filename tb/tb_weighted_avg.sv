// tb_weighted_avg: random row sums are averaged and the quotient
// NUM*5000/DEN (truncated toward zero) is compared with a direct computation;
// also checks the zero-denominator case and the fixed 40-cycle latency.
module tb_weighted_avg;
  import flc_pkg::*;

  localparam int LATENCY = 40;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [19:0] row_num [NUM_MF];
  logic        [15:0] row_den [NUM_MF];
  logic busy, done;
  fin_t y;

  weighted_avg dut (.clk, .rst_n, .start, .row_num, .row_den, .busy, .done, .y);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(int zero_den);
    longint n, d, expv;
    int cyc;
    n = 0;
    d = 0;
    for (int r = 0; r < 5; r++) begin
      int dd, nn;
      dd = zero_den ? 0 : int'($urandom_range(0, 50000));
      nn = zero_den ? 0 : int'($urandom_range(0, 2 * dd)) - dd;
      nn = nn * 2;   // |num| <= 2*den for half-unit consequents
      row_den[r] = 16'(dd);
      row_num[r] = 20'(nn);
      n += nn;
      d += dd;
    end
    expv = (d == 0) ? 0 : (n * 5000) / d;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (longint'(y) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d d=%0d y=%0d exp=%0d", n, d, y, expv);
    end
    checks++;
    if (cyc != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, LATENCY);
    end
  endtask

  initial begin
    for (int r = 0; r < 5; r++) begin
      row_num[r] = '0;
      row_den[r] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(1);
    repeat (300) run_one(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
