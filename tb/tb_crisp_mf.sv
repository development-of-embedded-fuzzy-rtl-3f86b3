// tb_crisp_mf: the crisp set is full only at its point c.
module tb_crisp_mf;
  import flc_pkg::*;

  int checks = 0, failures = 0;
  fin_t x;
  mu_t  mu;

  crisp_mf #(.C(2500)) dut (.x(x), .mu(mu));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 2490; v <= 2510; v++) begin
      x = fin_t'(v);
      #1;
      checks++;
      if (mu != ((v == 2500) ? 14'd10000 : 14'd0)) begin
        failures++;
        $display("FAIL x=%0d mu=%0d", v, mu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
