// tb_lf_wdf_impulse_full: unit-impulse response of both filters over one full
// 11 x 11 x 128 x 128 light field at the top's default size.
//
// An impulse of 255 (the largest 8-bit pixel) at n = (0,0,0,0) is followed by zeros.
// Each filter's response is compared in two ways: sample by sample with the bit-exact
// fixed-point reference, and as a signal-to-noise ratio
//   SNR = 10 log10( sum h_real^2 / sum (h_real - h_fixed)^2 )
// against the same filter in double precision with the unrounded example multipliers,
// which measures the total effect of 13-bit multipliers and 15-bit waves. The response
// spreads over many thousands of samples of only a few LSBs, so rounding dominates: the
// design reaches about 23 dB (non-separable, two sections) and 33 dB (partially
// separable); the test requires 20 dB and 30 dB. It also requires that the fixed-point
// response dies out completely by the end of the light field (no limit cycle).
module tb_lf_wdf_impulse_full;
  import wdf_pkg::*;
  import wdf_ref_pkg::*;

  localparam int NS = 11, NT = 11, NU = 128, NV = 128;
  localparam int LF = NS * NT * NU * NV;

  logic clk = 0, rst = 1;
  ns_coef_t ns_coef1, ns_coef2;
  ps_coef_t ps_coef;
  logic in_valid = 0;
  pix_t in_pix;
  logic ns_valid, ns_last, ps_valid, ps_last;
  sys_t ns_data, ps_data;
  int checks = 0, failures = 0, errs = 0;
  int x[], m1[], yns[], m2[], yps[];
  real xr[], mr1[], hns[], mr2[], hps[];
  real sig_ns = 0.0, err_ns = 0.0, sig_ps = 0.0, err_ps = 0.0;
  int ko_ns = 0, ko_ps = 0;

  lf_wdf_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (LF + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (ns_valid) begin
        real e;
        checks++;
        if (int'(ns_data) != yns[ko_ns]) begin
          failures++; errs++;
          if (errs < 10) $display("FAIL ns k=%0d got %0d exp %0d", ko_ns, ns_data, yns[ko_ns]);
        end
        e = hns[ko_ns] - real'(ns_data) / 8192.0;
        sig_ns += hns[ko_ns] * hns[ko_ns];
        err_ns += e * e;
        ko_ns++;
      end
      if (ps_valid) begin
        real e;
        checks++;
        if (int'(ps_data) != yps[ko_ps]) begin
          failures++; errs++;
          if (errs < 10) $display("FAIL ps k=%0d got %0d exp %0d", ko_ps, ps_data, yps[ko_ps]);
        end
        e = hps[ko_ps] - real'(ps_data) / 8192.0;
        sig_ps += hps[ko_ps] * hps[ko_ps];
        err_ps += e * e;
        ko_ps++;
      end
    end
  end

  initial begin
    int gn[5], gsu[3];
    real rn[5], rsu[3];
    real snr_ns, snr_ps;
    ns_coef1 = NS_COEF_EXAMPLE;
    ns_coef2 = NS_COEF_EXAMPLE;
    ps_coef.su = SEC2D_COEF_EXAMPLE;
    ps_coef.tv = SEC2D_COEF_EXAMPLE;
    gn  = '{int'(ns_coef1.g1), int'(ns_coef1.g2), int'(ns_coef1.g3), int'(ns_coef1.g4),
            int'(ns_coef1.g5)};
    gsu = '{int'(ps_coef.su.g_src), int'(ps_coef.su.g_in), int'(ps_coef.su.g_load)};
    rn  = '{0.5556, 0.72, 1.087, 0.652, 0.75};
    rsu = '{0.5556, 1.0588, 0.5882};
    x  = new[LF];
    xr = new[LF];
    foreach (x[k]) begin
      x[k]  = (k == 0) ? 255 * 32 : 0;
      xr[k] = real'(x[k]) / 8192.0;
    end
    ref_ns(gn, NS, NT, NU, NV, x, m1);
    ref_ns(gn, NS, NT, NU, NV, m1, yns);
    ref_2d(gsu, 0, NS, NT, NU, NV, x, m2);
    ref_2d(gsu, 1, NS, NT, NU, NV, m2, yps);
    real_ns(rn, NS, NT, NU, NV, xr, mr1);
    real_ns(rn, NS, NT, NU, NV, mr1, hns);
    real_2d(rsu, 0, NS, NT, NU, NV, xr, mr2);
    real_2d(rsu, 1, NS, NT, NU, NV, mr2, hps);
    in_pix = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < LF; k++) begin
      in_valid = 1;
      in_pix   = (k == 0) ? 8'd255 : 8'd0;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks += 5;
    if (ko_ns != LF || ko_ps != LF) begin failures++; $display("FAIL output count"); end
    snr_ns = 10.0 * $log10(sig_ns / err_ns);
    snr_ps = 10.0 * $log10(sig_ps / err_ps);
    $display("impulse response SNR: non-separable %0.2f dB, partially-separable %0.2f dB",
             snr_ns, snr_ps);
    if (snr_ns < 20.0) begin failures++; $display("FAIL non-separable SNR"); end
    if (snr_ps < 30.0) begin failures++; $display("FAIL partially-separable SNR"); end
    // no zero-input limit cycle: the last quarter of the light field must be exactly zero
    for (int k = 3 * (LF / 4); k < LF; k++) begin
      if (yns[k] != 0 || yps[k] != 0) begin
        failures++; $display("FAIL residual oscillation at k=%0d", k); break;
      end
    end
    if (sig_ns == 0.0 || sig_ps == 0.0) begin failures++; $display("FAIL empty response"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
