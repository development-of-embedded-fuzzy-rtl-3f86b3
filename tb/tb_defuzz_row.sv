// tb_defuzz_row: row sums sum(w*z) and sum(w) for random strengths and
// random half-unit consequents, including the extremes.
module tb_defuzz_row;
  import flc_pkg::*;

  int checks = 0, failures = 0;
  mu_vec_t w;
  logic [0:NUM_MF-1][RULE_W-1:0] z;
  logic signed [19:0] num;
  logic        [15:0] den;

  defuzz_row dut (.w(w), .z(z), .num(num), .den(den));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int en, ed, zi;
      en = 0;
      ed = 0;
      for (int j = 0; j < 5; j++) begin
        w[j] = (t < 2) ? MU_W'(10000) : MU_W'($urandom_range(0, 10000));
        zi   = (t == 0) ? 2 : (t == 1) ? -2 : int'($urandom_range(0, 4)) - 2;
        z[j] = RULE_W'(zi);
        en  += int'(w[j]) * zi;
        ed  += int'(w[j]);
      end
      #1;
      checks += 2;
      if (int'(num) != en || int'(den) != ed) begin
        failures++;
        if (failures < 10) $display("FAIL num %0d/%0d den %0d/%0d", num, en, den, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
