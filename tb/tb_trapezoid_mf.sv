// tb_trapezoid_mf: sweeps the input for two trapezoids and compares the grade
// with the division form of the trapezoidal membership function (shoulders a
// quarter unit wide).
module tb_trapezoid_mf;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  int checks = 0, failures = 0;
  fin_t x;
  mu_t  mu_a, mu_b;

  trapezoid_mf #(.A_PT(-3750), .D_PT(3750)) dut_a (.x(x), .mu(mu_a));
  trapezoid_mf #(.A_PT(-9000), .D_PT(2000)) dut_b (.x(x), .mu(mu_b));

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d got %0d exp %0d", what, x, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -10000; v <= 10000; v += 29) begin
      x = fin_t'(v);
      #1;
      check(mu_a, ref_trap(v, -3750, -1250, 1250, 3750), "a");
      check(mu_b, ref_trap(v, -9000, -6500, -500, 2000), "b");
    end
    x = -5000; #1; check(mu_b, 10000, "flat top");
    x = 0;     #1; check(mu_a, 10000, "flat top a");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
