// tb_wdf_ns_filter: three small light fields (3 x 3 x 2 x 2) through the two-section
// non-separable filter, with different multiplier sets in the two sections and random
// input gaps. Outputs are compared with two reference sections in cascade; each output
// must appear exactly two clocks after its input.
module tb_wdf_ns_filter;
  import wdf_pkg::*;
  import wdf_ref_pkg::*;

  localparam int NS = 3, NT = 3, NU = 2, NV = 2;
  localparam int LF = NS * NT * NU * NV;
  localparam int NLF = 3;

  logic clk = 0, rst = 1;
  ns_coef_t coef1, coef2;
  logic in_valid = 0, out_valid, out_last;
  sys_t in_data, out_data;
  int checks = 0, failures = 0;
  int x[], m[], y[];
  int ko = 0;
  logic [1:0] vpipe;

  wdf_ns_filter #(.N_S(NS), .N_T(NT), .N_U(NU), .N_V(NV)) dut (.*);

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
    int g1[5], g2[5];
    coef1 = NS_COEF_EXAMPLE;
    // second hyperplane: a second depth, multipliers from R = 1, Ls = 0.5, Lt = 0.3,
    // Lu = 0.4, Lv = 0.6 with Eqs. (9)-(10) (g5 taken as R4/R3)
    coef2 = '{g1: coef_t'(1365), g2: coef_t'(1707), g3: coef_t'(1814), g4: coef_t'(1451),
              g5: coef_t'(1280)};
    g1 = '{int'(coef1.g1), int'(coef1.g2), int'(coef1.g3), int'(coef1.g4), int'(coef1.g5)};
    g2 = '{int'(coef2.g1), int'(coef2.g2), int'(coef2.g3), int'(coef2.g4), int'(coef2.g5)};
    x = new[NLF * LF];
    foreach (x[i]) x[i] = (i < LF) ? ((i == 0) ? 8192 : 0) : $urandom_range(0, 8191);
    ref_ns(g1, NS, NT, NU, NV, x, m);
    ref_ns(g2, NS, NT, NU, NV, m, y);
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
