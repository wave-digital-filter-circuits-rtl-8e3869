// tb_series_adapter_rf: random and directed checks of the reflection-free series adapter
// against the integer reference model, plus two physical properties computed in floating
// point: the matched port's reflected wave ignores its own incident wave, and the power
// balance of a lossless series junction, sum(a^2/R) = sum(b^2/R), holds to rounding error.
module tb_series_adapter_rf;
  import wdf_pkg::*;
  import wdf_ref_pkg::*;
  coef_t g1;
  sys_t a1, a2, a3, b1, b2, b3;
  int checks = 0, failures = 0;

  series_adapter_rf dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e1, e2, e3;
    sys_t b3_prev;
    real r1, r2, r3, pa, pb, g;
    for (int i = 0; i < 3000; i++) begin
      g1 = coef_t'($urandom_range(100, 2000));
      a1 = sys_t'($signed($urandom_range(0, 8191)) - 4096);
      a2 = sys_t'($signed($urandom_range(0, 8191)) - 4096);
      a3 = sys_t'($signed($urandom_range(0, 8191)) - 4096);
      if (i < 20) begin a1 = SYS_MAX; a2 = SYS_MAX; a3 = SYS_MAX; end
      #1;
      ref_rf(int'(g1), int'(a1), int'(a2), int'(a3), e1, e2, e3);
      checks++;
      if (int'(b1) != e1 || int'(b2) != e2 || int'(b3) != e3) begin
        failures++;
        $display("FAIL g=%0d a=%0d %0d %0d got %0d %0d %0d exp %0d %0d %0d",
                 g1, a1, a2, a3, b1, b2, b3, e1, e2, e3);
      end
      // b3 independent of a3
      b3_prev = b3;
      a3 = sys_t'($signed($urandom_range(0, 8191)) - 4096);
      #1;
      checks++;
      if (b3 != b3_prev) begin failures++; $display("FAIL b3 depends on a3"); end
      // power balance with R1 = g*R3, R2 = (1-g)*R3, R3 = 1
      if (i >= 20) begin
        g  = real'(g1) / 2048.0;
        r1 = g; r2 = 1.0 - g; r3 = 1.0;
        pa = (real'(a1) ** 2) / r1 + (real'(a2) ** 2) / r2 + (real'(a3) ** 2) / r3;
        pb = (real'(b1) ** 2) / r1 + (real'(b2) ** 2) / r2 + (real'(b3) ** 2) / r3;
        checks++;
        if ((pa - pb) > 0.002 * pa + 40000.0 / (r1 * r2) || (pb - pa) > 0.002 * pa + 40000.0 / (r1 * r2)) begin
          failures++; $display("FAIL power pa=%f pb=%f", pa, pb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
