// tb_lf_wdf_top: end-to-end test of the light-field depth filter top at a reduced size
// (3 x 3 x 4 x 3). Four light fields of 8-bit pixels go in with random gaps: a unit
// impulse, a random field, a constant field and another random field. Both filter outputs
// are compared sample by sample with the reference model (two 4-D sections in cascade for
// the non-separable filter, an s-u and a t-v 2-D section for the partially-separable
// one), and both must deliver each sample exactly two clocks after it went in.
// The test also counts, from the coordinates of the accepted samples, how often each
// mechanism of the design was exercised: the zero initial conditions on the s, t, u and
// v edges, the v recursion continuing from one light
// field into the next, input gaps that hold the state, and end-of-light-field markers;
// a mechanism never exercised counts as a failure.
module tb_lf_wdf_top;
  import wdf_pkg::*;
  import wdf_ref_pkg::*;

  localparam int NS = 3, NT = 3, NU = 4, NV = 3;
  localparam int LF = NS * NT * NU * NV;
  localparam int NLF = 4;

  logic clk = 0, rst = 1;
  ns_coef_t ns_coef1, ns_coef2;
  ps_coef_t ps_coef;
  logic in_valid = 0;
  pix_t in_pix;
  logic ns_valid, ns_last, ps_valid, ps_last;
  sys_t ns_data, ps_data;
  int checks = 0, failures = 0;
  int pix[], x[], m1[], yns[], m2[], yps[];
  int ko_ns = 0, ko_ps = 0, ki = 0;
  logic [1:0] vpipe;
  int n_zic_s = 0, n_zic_t = 0, n_zic_u = 0, n_zic_v = 0, n_vcont = 0, n_gap = 0;
  int n_last_ns = 0, n_last_ps = 0;

  lf_wdf_top #(.N_S(NS), .N_T(NT), .N_U(NU), .N_V(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    vpipe <= rst ? 2'b00 : {vpipe[0], in_valid};
    if (!rst) begin
      if (in_valid) begin
        coord_t c;
        c = coord(ki, NS, NT, NU, NV);
        if (c.s == 0) n_zic_s++;
        if (c.t == 0) n_zic_t++;
        if (c.u == 0) n_zic_u++;
        if (c.v == 0 && c.lf == 0) n_zic_v++;
        if (c.v == 0 && c.lf > 0) n_vcont++;
        ki++;
      end else if (ko_ns > 0 && ko_ns < NLF * LF) n_gap++;
      if (ns_valid !== vpipe[1] || ps_valid !== vpipe[1]) begin
        failures++; $display("FAIL latency");
      end
      if (ns_valid) begin
        checks++;
        if (int'(ns_data) != yns[ko_ns] || ns_last != (ko_ns % LF == LF - 1)) begin
          failures++; $display("FAIL ns k=%0d got %0d exp %0d", ko_ns, ns_data, yns[ko_ns]);
        end
        if (ns_last) n_last_ns++;
        ko_ns++;
      end
      if (ps_valid) begin
        checks++;
        if (int'(ps_data) != yps[ko_ps] || ps_last != (ko_ps % LF == LF - 1)) begin
          failures++; $display("FAIL ps k=%0d got %0d exp %0d", ko_ps, ps_data, yps[ko_ps]);
        end
        if (ps_last) n_last_ps++;
        ko_ps++;
      end
    end
  end

  task automatic need(int count, string what);
    checks++;
    $display("%-34s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL never exercised: %s", what); end
  endtask

  initial begin
    int gn[5], gsu[3], gtv[3];
    ns_coef1 = NS_COEF_EXAMPLE;
    ns_coef2 = NS_COEF_EXAMPLE;
    ps_coef.su = SEC2D_COEF_EXAMPLE;
    ps_coef.tv = SEC2D_COEF_EXAMPLE;
    gn  = '{int'(ns_coef1.g1), int'(ns_coef1.g2), int'(ns_coef1.g3), int'(ns_coef1.g4),
            int'(ns_coef1.g5)};
    gsu = '{int'(ps_coef.su.g_src), int'(ps_coef.su.g_in), int'(ps_coef.su.g_load)};
    gtv = gsu;
    pix = new[NLF * LF];
    x   = new[NLF * LF];
    foreach (pix[i]) begin
      case (i / LF)
        0:       pix[i] = (i == 0) ? 255 : 0;
        2:       pix[i] = 200;
        default: pix[i] = $urandom_range(0, 255);
      endcase
      x[i] = pix[i] * 32;   // p/256 in Q2.13
    end
    ref_ns(gn, NS, NT, NU, NV, x, m1);
    ref_ns(gn, NS, NT, NU, NV, m1, yns);
    ref_2d(gsu, 0, NS, NT, NU, NV, x, m2);
    ref_2d(gtv, 1, NS, NT, NU, NV, m2, yps);
    in_pix = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < NLF * LF; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_pix   = pix_t'(pix[k]);
      if (in_valid) k++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks += 2;
    if (ko_ns != NLF * LF) begin failures++; $display("FAIL ns output count %0d", ko_ns); end
    if (ko_ps != NLF * LF) begin failures++; $display("FAIL ps output count %0d", ko_ps); end
    need(n_zic_s, "zero initial condition, s edge");
    need(n_zic_t, "zero initial condition, t edge");
    need(n_zic_u, "zero initial condition, u edge");
    need(n_zic_v, "zero initial condition, v (first LF)");
    need(n_vcont, "v recursion carried across LFs");
    need(n_gap, "input gaps (state held)");
    need(n_last_ns, "end of light field (non-separable)");
    need(n_last_ps, "end of light field (part.-separable)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
