// tb_scan_counter: checks the raster-scan coordinates, edge (ZIC) flags, end-of-light-field
// marker and first-light-field flag of scan_counter against coordinates computed by
// division from a running sample count, over three light fields with random input gaps.
module tb_scan_counter;
  import wdf_pkg::*;
  import wdf_ref_pkg::*;

  localparam int NS = 3, NT = 2, NU = 4, NV = 3;
  localparam int LF = NS * NT * NU * NV;

  logic clk = 0, rst = 1, en = 0;
  logic [$clog2(NS)-1:0] n_s;
  logic [$clog2(NT)-1:0] n_t;
  logic [$clog2(NU)-1:0] n_u;
  logic [$clog2(NV)-1:0] n_v;
  zic_t zic;
  logic last, first_lf;
  int checks = 0, failures = 0;
  int k = 0;

  scan_counter #(.N_S(NS), .N_T(NT), .N_U(NU), .N_V(NV)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL k=%0d %s", k, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coord_t c;
    repeat (3) @(posedge clk);
    rst <= 0;
    while (k < 3 * LF) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      c = coord(k, NS, NT, NU, NV);
      check(int'(n_s) == c.s && int'(n_t) == c.t && int'(n_u) == c.u && int'(n_v) == c.v,
            "coordinates");
      check(zic.s == (c.s == 0) && zic.t == (c.t == 0) && zic.u == (c.u == 0), "zic s/t/u");
      check(zic.v == (c.v == 0 && c.lf == 0), "zic v only in first light field");
      check(last == (k % LF == LF - 1), "last");
      check(first_lf == (c.lf == 0), "first_lf");
      @(posedge clk);
      if (en) k++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
