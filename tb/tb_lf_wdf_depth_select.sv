// tb_lf_wdf_depth_select: depth selectivity and run-time retuning of both filters at the
// top's default size (11 x 11 x 128 x 128).
//
// Two synthetic scenes each hold one textured plane at a single depth: the texture
// shifts by d pixels per camera step, p = 128 + 100*cos(w*(n_u - d*n_s))*cos(w*(n_v - d*n_t)),
// whose spectrum lies on the plane w_s = -d*w_u, w_t = -d*w_v. With R = 1 and inductances
// Ls = Lt = 5, Lu = Lv = 5*d (prewarped, see tune), a filter's passband holds the texture's
// spectral lines, so the multipliers for depth d follow from the closed-form design equations:
//   partially separable, per section: R1 = 1 + L1, g_src = 1/R1,
//       g_in = 2*R1/(R1 + L2 + 1), g_load = 2/(R1 + L2 + 1);
//   non-separable: section 1 holds Ls, Lu (Lt = Lv = 0), section 2 holds Lt, Lv
//       (Ls = Lu = 0), with R1 = 1 + Ls, R2 = R1 + Lt, R3 = 1 + Lv,
//       g1 = 1/R1, g2 = R1/R2, g3 = 2*R2/(R2+Lu+R3), g4 = 2*R3/(R2+Lu+R3), g5 = 1/R3.
// The filters are tuned to depth A, both scenes are filtered, then the multipliers are
// reloaded for depth B (after a reset) and both scenes are filtered again. For each
// run the output variance over the interior of the grid (n_s, n_t >= 5) is measured.
// The scene at the tuned depth must keep at least twice the variance of the scene at the
// other depth, for both filters and both tunings. Every output is also compared with the
// bit-exact reference model.
module tb_lf_wdf_depth_select;
  import wdf_pkg::*;
  import wdf_ref_pkg::*;

  localparam int NS = 11, NT = 11, NU = 128, NV = 128;
  localparam int LF = NS * NT * NU * NV;
  localparam real D_A = 0.25, D_B = 1.0, W = 1.0, LS = 5.0;

  logic clk = 0, rst = 1;
  ns_coef_t ns_coef1, ns_coef2;
  ps_coef_t ps_coef;
  logic in_valid = 0;
  pix_t in_pix;
  logic ns_valid, ns_last, ps_valid, ps_last;
  sys_t ns_data, ps_data;
  int checks = 0, failures = 0, errs = 0;
  int x[], m1[], yns[], m2[], yps[];
  int ko_ns = 0, ko_ps = 0;
  real s1_ns, s2_ns, s1_ps, s2_ps;
  longint cnt;
  int retunes = 0;

  lf_wdf_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * (LF + 100) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic coef_t q(real v);
    return coef_t'($rtoi(v * 2048.0 + 0.5));
  endfunction

  function automatic sec2d_coef_t sec2d(real l1, real l2);
    real r1, den;
    sec2d_coef_t c;
    r1 = 1.0 + l1;
    den = r1 + l2 + 1.0;
    c.g_src = q(1.0 / r1);
    c.g_in = q(2.0 * r1 / den);
    c.g_load = q(2.0 / den);
    return c;
  endfunction

  function automatic ns_coef_t nsc(real ls, real lt, real lu, real lv);
    real r1, r2, r3, den;
    ns_coef_t c;
    r1 = 1.0 + ls;
    r2 = r1 + lt;
    r3 = 1.0 + lv;
    den = r2 + lu + r3;
    c.g1 = q(1.0 / r1);
    c.g2 = q(r1 / r2);
    c.g3 = q(2.0 * r2 / den);
    c.g4 = q(2.0 * r3 / den);
    c.g5 = q(1.0 / r3);
    return c;
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      if (ns_valid) begin
        coord_t c;
        checks++;
        if (int'(ns_data) != yns[ko_ns]) begin
          failures++; errs++;
          if (errs < 10) $display("FAIL ns k=%0d got %0d exp %0d", ko_ns, ns_data, yns[ko_ns]);
        end
        c = coord(ko_ns, NS, NT, NU, NV);
        if (c.s >= 5 && c.t >= 5) begin
          s1_ns += real'(ns_data); s2_ns += real'(ns_data) ** 2;
          s1_ps += real'(ps_data); s2_ps += real'(ps_data) ** 2;
          cnt++;
        end
        ko_ns++;
      end
      if (ps_valid) begin
        checks++;
        if (int'(ps_data) != yps[ko_ps]) begin
          failures++; errs++;
          if (errs < 10) $display("FAIL ps k=%0d got %0d exp %0d", ko_ps, ps_data, yps[ko_ps]);
        end
        ko_ps++;
      end
    end
  end

  // Filter one scene (object at depth d_obj) with the current multipliers; return the
  // interior output variances of both filters.
  task automatic run(input real d_obj, output real v_ns, output real v_ps);
    int gn1[5], gn2[5], gsu[3], gtv[3];
    gn1 = '{int'(ns_coef1.g1), int'(ns_coef1.g2), int'(ns_coef1.g3), int'(ns_coef1.g4), int'(ns_coef1.g5)};
    gn2 = '{int'(ns_coef2.g1), int'(ns_coef2.g2), int'(ns_coef2.g3), int'(ns_coef2.g4), int'(ns_coef2.g5)};
    gsu = '{int'(ps_coef.su.g_src), int'(ps_coef.su.g_in), int'(ps_coef.su.g_load)};
    gtv = '{int'(ps_coef.tv.g_src), int'(ps_coef.tv.g_in), int'(ps_coef.tv.g_load)};
    x = new[LF];
    for (int k = 0; k < LF; k++) begin
      coord_t c;
      c = coord(k, NS, NT, NU, NV);
      x[k] = 32 * (128 + $rtoi(100.0 * $cos(W * (real'(c.u) - d_obj * real'(c.s)))
                                    * $cos(W * (real'(c.v) - d_obj * real'(c.t)))));
    end
    ref_ns(gn1, NS, NT, NU, NV, x, m1);
    ref_ns(gn2, NS, NT, NU, NV, m1, yns);
    ref_2d(gsu, 0, NS, NT, NU, NV, x, m2);
    ref_2d(gtv, 1, NS, NT, NU, NV, m2, yps);
    @(negedge clk);
    rst = 1;
    @(negedge clk);
    rst = 0;
    ko_ns = 0; ko_ps = 0;
    s1_ns = 0.0; s2_ns = 0.0; s1_ps = 0.0; s2_ps = 0.0; cnt = 0;
    for (int k = 0; k < LF; k++) begin
      in_valid = 1;
      in_pix   = pix_t'(x[k] / 32);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (ko_ns != LF || ko_ps != LF) begin failures++; $display("FAIL output count"); end
    v_ns = s2_ns / real'(cnt) - (s1_ns / real'(cnt)) ** 2;
    v_ps = s2_ps / real'(cnt) - (s1_ps / real'(cnt)) ** 2;
  endtask

  // The bilinear frequency mapping bends the passband plane: it passes
  // Ls*tan(w_s/2) + Lu*tan(w_u/2) = 0, so Lu is prewarped for the texture frequency W.
  task automatic tune(real d);
    real lu;
    lu = LS * $tan(d * W / 2.0) / $tan(W / 2.0);
    ns_coef1 = nsc(LS, 0.0, lu, 0.0);
    ns_coef2 = nsc(0.0, LS, 0.0, lu);
    ps_coef.su = sec2d(LS, lu);
    ps_coef.tv = sec2d(LS, lu);
    retunes++;
  endtask

  task automatic expect_ratio(string what, real keep, real reject);
    checks++;
    $display("%-40s passband/stopband variance ratio %0.2f (%0.0f / %0.0f)", what, keep / reject, keep, reject);
    if (keep < 2.0 * reject) begin failures++; $display("FAIL depth selectivity: %s", what); end
  endtask

  initial begin
    real va_ns, va_ps, vb_ns, vb_ps;
    in_pix = '0;
    repeat (3) @(posedge clk);
    tune(D_A);
    run(D_A, va_ns, va_ps);
    run(D_B, vb_ns, vb_ps);
    expect_ratio("non-separable tuned to depth A", va_ns, vb_ns);
    expect_ratio("partially-separable tuned to depth A", va_ps, vb_ps);
    tune(D_B);
    run(D_A, va_ns, va_ps);
    run(D_B, vb_ns, vb_ps);
    expect_ratio("non-separable tuned to depth B", vb_ns, va_ns);
    expect_ratio("partially-separable tuned to depth B", vb_ps, va_ps);
    checks++;
    if (retunes != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
