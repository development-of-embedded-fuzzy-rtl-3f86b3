// tb_triangle_mf: sweeps the input over -10000..10000 for three triangles
// (centres -5000, 0, 10000) and compares each grade with the division form
// of the triangular membership function.
module tb_triangle_mf;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  int checks = 0, failures = 0;
  fin_t x;
  mu_t  mu_m, mu_z, mu_p;

  triangle_mf #(.CENTER(-5000)) dut_m (.x(x), .mu(mu_m));
  triangle_mf #(.CENTER(0))     dut_z (.x(x), .mu(mu_z));
  triangle_mf #(.CENTER(10000)) dut_p (.x(x), .mu(mu_p));

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
    for (int v = -10000; v <= 10000; v += 37) begin
      x = fin_t'(v);
      #1;
      check(mu_m, ref_tri(v, -10000, -5000, 0), "center -5000");
      check(mu_z, ref_tri(v, -5000, 0, 5000), "center 0");
      check(mu_p, ref_tri(v, 5000, 10000, 15000), "center 10000");
    end
    // corners
    x = 0;      #1; check(mu_z, 10000, "peak");
    x = -2500;  #1; check(mu_z, 5000, "half");
    x = 5000;   #1; check(mu_z, 0, "right foot");
    x = 10000;  #1; check(mu_p, 10000, "outer peak");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
