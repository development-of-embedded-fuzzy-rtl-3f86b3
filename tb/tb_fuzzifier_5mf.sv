// tb_fuzzifier_5mf: checks saturation and the five grades of the triangular
// fuzzifier against the reference model (including the -3000 example, which
// must give {0, 6000, 4000, 0, 0}), that the triangular grades always add up
// to 10000, and the trapezoidal and crisp variants at a few points.
module tb_fuzzifier_5mf;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic signed [31:0] x;
  fin_t    xs_t, xs_p, xs_c;
  logic    sat_t, sat_p, sat_c;
  mu_vec_t mu_t, mu_p, mu_c;
  longint  ref_mu [5];

  fuzzifier_5mf #(.SHAPE(MF_TRIANGLE))  dut_t (.x_raw(x), .x_sat(xs_t), .sat(sat_t), .mu(mu_t));
  fuzzifier_5mf #(.SHAPE(MF_TRAPEZOID)) dut_p (.x_raw(x), .x_sat(xs_p), .sat(sat_p), .mu(mu_p));
  fuzzifier_5mf #(.SHAPE(MF_CRISP))     dut_c (.x_raw(x), .x_sat(xs_c), .sat(sat_c), .mu(mu_c));

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d got %0d exp %0d", what, x, got, exp);
    end
  endtask

  task automatic check_tri(longint v);
    longint sum;
    x = 32'(v);
    #1;
    fuzzify(v, ref_mu);
    sum = 0;
    for (int i = 0; i < 5; i++) begin
      check(mu_t[i], ref_mu[i], $sformatf("mu[%0d]", i));
      sum += mu_t[i];
    end
    check(sum, 10000, "sum");
    check(xs_t, sat(v, 10000), "x_sat");
    check(sat_t, (v > 10000 || v < -10000), "sat flag");
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // published example
    x = -3000;
    #1;
    check(mu_t[0], 0, "ex0");    check(mu_t[1], 6000, "ex1");
    check(mu_t[2], 4000, "ex2"); check(mu_t[3], 0, "ex3");
    check(mu_t[4], 0, "ex4");
    check_tri(-3000);
    check_tri(123456);
    check_tri(-70000);
    check_tri(10000);
    check_tri(-10000);
    repeat (300) check_tri(longint'($signed($urandom_range(0, 30000))) - 15000);
    // trapezoids: centre 0 set full over -1250..1250, neighbours meet at 2500
    x = 1000;  #1; check(mu_p[2], 10000, "trap top");   check(mu_p[3], 0, "trap ps");
    x = 2500;  #1; check(mu_p[2], 5000, "trap mid");    check(mu_p[3], 5000, "trap ps mid");
    x = -9000; #1; check(mu_p[0], 10000, "trap nb");    check(mu_p[1], 0, "trap ns");
    // crisp sets
    x = 5000;  #1; check(mu_c[3], 10000, "crisp ps");   check(mu_c[2], 0, "crisp z");
    x = 5001;  #1; check(mu_c[3], 0, "crisp off");
    x = 99999; #1; check(mu_c[4], 10000, "crisp sat");  check(sat_c, 1, "crisp sat flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
