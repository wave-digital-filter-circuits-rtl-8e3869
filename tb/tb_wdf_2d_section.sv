// tb_wdf_2d_section: runs three small light fields (3 x 2 x 3 x 2) through both kinds of
// 2-D WDF section, s-u and t-v, with random input gaps: a unit impulse and then random
// waves. Outputs are compared with the coordinate-indexed reference model, and each must
// appear exactly one clock after its input.
module tb_wdf_2d_section;
  import wdf_pkg::*;
  import wdf_ref_pkg::*;

  localparam int NS = 3, NT = 2, NU = 3, NV = 2;
  localparam int LF = NS * NT * NU * NV;
  localparam int NLF = 3;

  logic clk = 0, rst = 1;
  sec2d_coef_t coef;
  logic in_valid = 0, su_valid, su_last, tv_valid, tv_last;
  sys_t in_data, su_data, tv_data;
  int checks = 0, failures = 0;
  int x[], ysu[], ytv[];
  int ko = 0;
  logic in_valid_q;

  wdf_2d_section #(.N_S(NS), .N_T(NT), .N_U(NU), .N_V(NV), .PAIR(PAIR_SU)) dut_su (
    .clk, .rst, .coef, .in_valid, .in_data,
    .out_valid(su_valid), .out_data(su_data), .out_last(su_last));
  wdf_2d_section #(.N_S(NS), .N_T(NT), .N_U(NU), .N_V(NV), .PAIR(PAIR_TV)) dut_tv (
    .clk, .rst, .coef, .in_valid, .in_data,
    .out_valid(tv_valid), .out_data(tv_data), .out_last(tv_last));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    in_valid_q <= rst ? 1'b0 : in_valid;
    if (!rst) begin
      if (su_valid !== in_valid_q || tv_valid !== in_valid_q) begin
        failures++; $display("FAIL latency");
      end
      if (su_valid) begin
        checks += 2;
        if (int'(su_data) != ysu[ko] || su_last != (ko % LF == LF - 1)) begin
          failures++; $display("FAIL su k=%0d got %0d exp %0d", ko, su_data, ysu[ko]);
        end
        if (int'(tv_data) != ytv[ko] || tv_last != (ko % LF == LF - 1)) begin
          failures++; $display("FAIL tv k=%0d got %0d exp %0d", ko, tv_data, ytv[ko]);
        end
        ko++;
      end
    end
  end

  initial begin
    int g[3];
    coef = SEC2D_COEF_EXAMPLE;
    g = '{int'(coef.g_src), int'(coef.g_in), int'(coef.g_load)};
    x = new[NLF * LF];
    foreach (x[i]) x[i] = (i < LF) ? ((i == 0) ? 8192 : 0) : $urandom_range(0, 8191);
    ref_2d(g, 0, NS, NT, NU, NV, x, ysu);
    ref_2d(g, 1, NS, NT, NU, NV, x, ytv);
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
