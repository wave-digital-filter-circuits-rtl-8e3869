// tb_wdf_ps_filter: three small light fields (3 x 3 x 2 x 2) through the partially-
// separable filter (s-u section then t-v section, different multiplier sets), with random
// input gaps. Outputs are compared with the two reference 2-D sections in cascade; each
// output must appear exactly two clocks after its input.
module tb_wdf_ps_filter;
  import wdf_pkg::*;
  import wdf_ref_pkg::*;

  localparam int NS = 3, NT = 3, NU = 2, NV = 2;
  localparam int LF = NS * NT * NU * NV;
  localparam int NLF = 3;

  logic clk = 0, rst = 1;
  ps_coef_t coef;
  logic in_valid = 0, out_valid, out_last;
  sys_t in_data, out_data;
  int checks = 0, failures = 0;
  int x[], m[], y[];
  int ko = 0;
  logic [1:0] vpipe;

  wdf_ps_filter #(.N_S(NS), .N_T(NT), .N_U(NU), .N_V(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    vpipe <= rst ? 2'b00 : {vpipe[0], in_valid};
    if (!rst) begin
      if (out_valid !== vpipe[1]) begin failures++; $display("FAIL latency"); end
      if (out_valid) begin
        checks++;
        if (int'(out_data) != y[ko] || out_last != (ko % LF == LF - 1)) begin
          failures++; $display("FAIL k=%0d got %0d exp %0d", ko, out_data, y[ko]);
        end
        ko++;
      end
    end
  end

  initial begin
    int gsu[3], gtv[3];
    coef.su = SEC2D_COEF_EXAMPLE;
    // t-v section from R = 1, Lt = 0.5, Lv = 0.4: g_src = 1/1.5, g_in = 3/2.9, g_load = 2/2.9
    coef.tv = '{g_src: coef_t'(1365), g_in: coef_t'(2119), g_load: coef_t'(1412)};
    gsu = '{int'(coef.su.g_src), int'(coef.su.g_in), int'(coef.su.g_load)};
    gtv = '{int'(coef.tv.g_src), int'(coef.tv.g_in), int'(coef.tv.g_load)};
    x = new[NLF * LF];
    foreach (x[i]) x[i] = (i < LF) ? ((i == 0) ? 8192 : 0) : $urandom_range(0, 8191);
    ref_2d(gsu, 0, NS, NT, NU, NV, x, m);
    ref_2d(gtv, 1, NS, NT, NU, NV, m, y);
    in_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < NLF * LF; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = sys_t'(x[k]);
      if (in_valid) k++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (ko != NLF * LF) begin failures++; $display("FAIL output count %0d", ko); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
