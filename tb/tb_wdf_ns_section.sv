// tb_wdf_ns_section: runs three small light fields (3 x 2 x 3 x 2) through one 4-D
// non-separable WDF section with random input gaps: first a unit impulse, then random
// waves. Every output is compared with the coordinate-indexed reference model, and each
// output must appear exactly one clock after its input (latency 1, one sample per clock).
module tb_wdf_ns_section;
  import wdf_pkg::*;
  import wdf_ref_pkg::*;

  localparam int NS = 3, NT = 2, NU = 3, NV = 2;
  localparam int LF = NS * NT * NU * NV;
  localparam int NLF = 3;

  logic clk = 0, rst = 1;
  ns_coef_t coef;
  logic in_valid = 0, out_valid, out_last;
  sys_t in_data, out_data;
  int checks = 0, failures = 0;
  int x[], y[];
  int ko = 0;
  logic in_valid_q;

  wdf_ns_section #(.N_S(NS), .N_T(NT), .N_U(NU), .N_V(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: out_valid is in_valid delayed by one clock
  always @(posedge clk) begin
    in_valid_q <= rst ? 1'b0 : in_valid;
    if (!rst) begin
      if (out_valid !== in_valid_q) begin
        failures++; $display("FAIL latency");
      end
      if (out_valid) begin
        checks++;
        if (int'(out_data) != y[ko] || out_last != (ko % LF == LF - 1)) begin
          failures++;
          $display("FAIL k=%0d got %0d exp %0d last=%0d", ko, out_data, y[ko], out_last);
        end
        ko++;
      end
    end
  end

  initial begin
    int g[5];
    coef = NS_COEF_EXAMPLE;
    g = '{int'(coef.g1), int'(coef.g2), int'(coef.g3), int'(coef.g4), int'(coef.g5)};
    x = new[NLF * LF];
    foreach (x[i]) x[i] = (i < LF) ? ((i == 0) ? 8192 : 0) : $urandom_range(0, 8191);
    ref_ns(g, NS, NT, NU, NV, x, y);
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
    repeat (4) @(posedge clk);
    checks++;
    if (ko != NLF * LF) begin failures++; $display("FAIL output count %0d", ko); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
