// tb_lf_wdf_top_full: one complete 11 x 11 x 128 x 128 light field through the top at
// its default size, one pixel per clock without gaps. The pixels form a synthetic scene
// (a smooth gradient with a bright square that shifts from view to view, plus noise);
// both filter outputs are compared sample by sample with the reference model, and the
// run must take exactly N_S*N_T*N_U*N_V + 2 clocks from the first pixel in to the last
// filtered sample out (one sample per clock, latency two).
module tb_lf_wdf_top_full;
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
  int checks = 0, failures = 0, errs_ns = 0, errs_ps = 0;
  int pix[], x[], m1[], yns[], m2[], yps[];
  int ko_ns = 0, ko_ps = 0;
  longint cyc = 0, first_in = -1, last_out = -1;

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
    cyc <= cyc + 1;
    if (!rst) begin
      if (in_valid && first_in < 0) first_in = cyc;
      if (ns_valid) begin
        checks++;
        if (int'(ns_data) != yns[ko_ns] || ns_last != (ko_ns == LF - 1)) begin
          failures++; errs_ns++;
          if (errs_ns < 10) $display("FAIL ns k=%0d got %0d exp %0d", ko_ns, ns_data, yns[ko_ns]);
        end
        ko_ns++;
        if (ns_last) last_out = cyc;
      end
      if (ps_valid) begin
        checks++;
        if (int'(ps_data) != yps[ko_ps] || ps_last != (ko_ps == LF - 1)) begin
          failures++; errs_ps++;
          if (errs_ps < 10) $display("FAIL ps k=%0d got %0d exp %0d", ko_ps, ps_data, yps[ko_ps]);
        end
        ko_ps++;
      end
    end
  end

  initial begin
    int gn[5], gsu[3];
    ns_coef1 = NS_COEF_EXAMPLE;
    ns_coef2 = NS_COEF_EXAMPLE;
    ps_coef.su = SEC2D_COEF_EXAMPLE;
    ps_coef.tv = SEC2D_COEF_EXAMPLE;
    gn  = '{int'(ns_coef1.g1), int'(ns_coef1.g2), int'(ns_coef1.g3), int'(ns_coef1.g4),
            int'(ns_coef1.g5)};
    gsu = '{int'(ps_coef.su.g_src), int'(ps_coef.su.g_in), int'(ps_coef.su.g_load)};
    pix = new[LF];
    x   = new[LF];
    for (int k = 0; k < LF; k++) begin
      coord_t c;
      int p;
      c = coord(k, NS, NT, NU, NV);
      p = (c.u + c.v) / 4 + $urandom_range(0, 15);
      // a square whose position shifts by one pixel per camera step (a single depth)
      if (c.u - c.s >= 40 && c.u - c.s < 80 && c.v - c.t >= 40 && c.v - c.t < 80) p += 120;
      pix[k] = (p > 255) ? 255 : p;
      x[k]   = pix[k] * 32;
    end
    ref_ns(gn, NS, NT, NU, NV, x, m1);
    ref_ns(gn, NS, NT, NU, NV, m1, yns);
    ref_2d(gsu, 0, NS, NT, NU, NV, x, m2);
    ref_2d(gsu, 1, NS, NT, NU, NV, m2, yps);
    in_pix = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < LF; k++) begin
      in_valid = 1;
      in_pix   = pix_t'(pix[k]);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks += 3;
    if (ko_ns != LF) begin failures++; $display("FAIL ns output count %0d", ko_ns); end
    if (ko_ps != LF) begin failures++; $display("FAIL ps output count %0d", ko_ps); end
    if (last_out - first_in != longint'(LF) + 1) begin
      failures++;
      $display("FAIL throughput: %0d clocks from first input to last output", last_out - first_in);
    end
    $display("light field of %0d samples filtered in %0d clocks", LF, last_out - first_in + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
