// tb_series_adapter_un: random and directed checks of the unconstrained series adapter
// against the integer reference model, plus the power balance of a lossless series
// junction for random port resistances, computed in floating point.
module tb_series_adapter_un;
  import wdf_pkg::*;
  import wdf_ref_pkg::*;
  coef_t g1, g3;
  sys_t a1, a2, a3, b1, b2, b3;
  int checks = 0, failures = 0;

  series_adapter_un dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e1, e2, e3;
    real r1, r2, r3, rs, pa, pb, tol;
    for (int i = 0; i < 3000; i++) begin
      // random resistances, multipliers 2Rk/(R1+R2+R3) in Q2.11
      r1 = real'($urandom_range(10, 100)) / 50.0;
      r2 = real'($urandom_range(10, 100)) / 50.0;
      r3 = real'($urandom_range(10, 100)) / 50.0;
      rs = r1 + r2 + r3;
      g1 = coef_t'(int'(2.0 * r1 / rs * 2048.0));
      g3 = coef_t'(int'(2.0 * r3 / rs * 2048.0));
      a1 = sys_t'($signed($urandom_range(0, 8191)) - 4096);
      a2 = sys_t'($signed($urandom_range(0, 8191)) - 4096);
      a3 = sys_t'($signed($urandom_range(0, 8191)) - 4096);
      if (i < 20) begin a1 = SYS_MIN; a2 = SYS_MIN; a3 = SYS_MIN; end
      #1;
      ref_un(int'(g1), int'(g3), int'(a1), int'(a2), int'(a3), e1, e2, e3);
      checks++;
      if (int'(b1) != e1 || int'(b2) != e2 || int'(b3) != e3) begin
        failures++;
        $display("FAIL a=%0d %0d %0d got %0d %0d %0d exp %0d %0d %0d",
                 a1, a2, a3, b1, b2, b3, e1, e2, e3);
      end
      if (i >= 20) begin
        // use the resistances the quantized multipliers imply
        r1 = real'(g1) / 2048.0; r3 = real'(g3) / 2048.0; r2 = 2.0 - r1 - r3;
        pa = (real'(a1) ** 2) / r1 + (real'(a2) ** 2) / r2 + (real'(a3) ** 2) / r3;
        pb = (real'(b1) ** 2) / r1 + (real'(b2) ** 2) / r2 + (real'(b3) ** 2) / r3;
        tol = 0.002 * pa + 20000.0 * (1.0 / r1 + 1.0 / r2 + 1.0 / r3);
        checks++;
        if (pa - pb > tol || pb - pa > tol) begin
          failures++; $display("FAIL power pa=%f pb=%f", pa, pb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
