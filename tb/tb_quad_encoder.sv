// tb_quad_encoder: drives quadrature signals at constant rates in both
// directions (edge periods that divide the window, so each window holds an
// exact number of counts) and checks the measured speed against
// counts * 2*pi*1e9 / (1600 * 8000) mrad/s, the window period, the position
// count and the glitch flag for a two-channel jump. Runs at a 1 MHz clock so
// that the 8 ms window is 8000 clocks.
module tb_quad_encoder;
  localparam int CLK_HZ = 1_000_000;
  localparam int WINDOW = 8000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enc_a = 0, enc_b = 0;
  logic signed [31:0] position, speed;
  logic speed_valid, glitch;
  int cnt = 0;      // encoder state count driven by the testbench

  quad_encoder #(.CLK_HZ(CLK_HZ), .WINDOW_US(8000), .PULSES_PER_REV(400)) dut (
    .clk, .rst_n, .enc_a, .enc_b, .position, .speed, .speed_valid, .glitch);

  always #5 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (speed %0d, position %0d)", what, speed, position);
    end
  endtask

  // one quadrature step; Gray order 00, 01, 11, 10 counts up
  task automatic move(int dir);
    logic [1:0] ab;
    cnt += dir;
    case (cnt & 3)
      0: ab = 2'b00;
      1: ab = 2'b01;
      2: ab = 2'b11;
      default: ab = 2'b10;
    endcase
    {enc_a, enc_b} = ab;
  endtask

  // run at one count every 'per' clocks for 'wins' windows, check the last
  task automatic run_rate(int per, int dir, int wins);
    real expv;
    int  last_valid, gap;
    expv = real'(dir * WINDOW / per) * 6.283185307179586e9 / (1600.0 * 8000.0);
    last_valid = -1;
    for (int t = 0; t < wins * WINDOW; t++) begin
      @(negedge clk);
      if (t % per == 0) move(dir);
      if (speed_valid) begin
        if (last_valid >= 0) begin
          gap = t - last_valid;
          check(gap == WINDOW, $sformatf("window period %0d", gap));
        end
        last_valid = t;
      end
    end
    check(speed >= $rtoi(expv) - 1 && speed <= $rtoi(expv) + 1,
          $sformatf("speed for %0d counts/window, expected %0.1f", dir * WINDOW / per, expv));
    check(position == cnt, "position");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_rate(100, 1, 3);    // 80 counts per window  -> 39270 mrad/s
    run_rate(250, 1, 3);    // 32 counts per window  -> 15708 mrad/s
    run_rate(100, -1, 3);   // reverse
    run_rate(64, -1, 3);    // 125 counts per window
    run_rate(8000, 1, 3);   // 1 count per window
    check(!glitch, "no glitch yet");
    // jump both channels at once
    @(negedge clk) {enc_a, enc_b} = ~{enc_a, enc_b};
    repeat (5) @(negedge clk);
    check(glitch, "glitch flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
