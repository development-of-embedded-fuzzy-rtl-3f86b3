// tb_flc_core: the complete fuzzy controller against the reference Sugeno
// model, for the preliminary and the optimised rule tables, over a grid of
// inputs, random inputs and saturating inputs. Also checks the 41-cycle
// latency and the saturation flags.
module tb_flc_core;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  localparam int LATENCY = 41;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [31:0] e_in, de_in;
  logic busy1, done1, sat_e1, sat_de1, busy2, done2, sat_e2, sat_de2;
  fin_t y1, y2;

  flc_core #(.RULES(RULES_PRELIM)) dut1 (
    .clk, .rst_n, .start, .e_in, .de_in,
    .busy(busy1), .done(done1), .y(y1), .sat_e(sat_e1), .sat_de(sat_de1));

  flc_core #(.RULES(RULES_OPTIMIZED)) dut2 (
    .clk, .rst_n, .start, .e_in, .de_in,
    .busy(busy2), .done(done2), .y(y2), .sat_e(sat_e2), .sat_de(sat_de2));

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s e=%0d de=%0d got %0d exp %0d", what, e_in, de_in, got, exp);
    end
  endtask

  task automatic run_one(longint e, longint de);
    int cyc;
    e_in  = 32'(e);
    de_in = 32'(de);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done1) begin
      @(negedge clk);
      cyc++;
    end
    check(y1, flc(e, de, RULES_PRELIM), "prelim");
    check(y2, flc(e, de, RULES_OPTIMIZED), "optimized");
    check(cyc, LATENCY, "latency");
    check(sat_e1, (e > 10000 || e < -10000), "sat_e");
    check(sat_de1, (de > 10000 || de < -10000), "sat_de");
  endtask

  initial begin
    e_in  = '0;
    de_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // one value per rule: peaks of every pair of sets give the table entry
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        run_one((r - 2) * 5000, (c - 2) * 5000);
        check(y1, longint'($signed(RULES_PRELIM[r][c])) * 5000, "table entry");
      end
    for (int a = -12000; a <= 12000; a += 1700)
      for (int b = -12000; b <= 12000; b += 2300)
        run_one(a, b);
    repeat (300)
      run_one(longint'($urandom_range(0, 24000)) - 12000, longint'($urandom_range(0, 24000)) - 12000);
    run_one(-3000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
