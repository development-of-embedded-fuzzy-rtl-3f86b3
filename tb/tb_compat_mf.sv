// tb_compat_mf: rule strengths of a row are the minimum of the row's error
// grade and each change-of-error grade (random grades).
module tb_compat_mf;
  import flc_pkg::*;

  int checks = 0, failures = 0;
  mu_t     mu_e;
  mu_vec_t mu_de, w;

  compat_mf dut (.mu_e(mu_e), .mu_de(mu_de), .w(w));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) begin
      int exp_w;
      mu_e = MU_W'($urandom_range(0, 10000));
      for (int j = 0; j < 5; j++) mu_de[j] = MU_W'($urandom_range(0, 10000));
      if ($urandom_range(0, 3) == 0) mu_de[1] = mu_e;
      #1;
      for (int j = 0; j < 5; j++) begin
        exp_w = (int'(mu_de[j]) <= int'(mu_e)) ? int'(mu_de[j]) : int'(mu_e);
        checks++;
        if (int'(w[j]) != exp_w) begin
          failures++;
          if (failures < 10) $display("FAIL j=%0d e=%0d de=%0d w=%0d", j, mu_e, mu_de[j], w[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
