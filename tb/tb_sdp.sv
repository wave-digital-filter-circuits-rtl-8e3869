// tb_sdp: checks the inductor model: a_out is zero when zic is set and otherwise minus
// the b_in written DELAY (= 3) enabled samples earlier, saturated (-(-2) gives the largest
// positive wave). Random data includes the most negative value; enable has random gaps.
module tb_sdp;
  import wdf_pkg::*;
  logic clk = 0, rst = 1, en = 0, zic = 1;
  sys_t b_in, a_out;
  int hist[$];
  int checks = 0, failures = 0, sat_seen = 0, zic_seen = 0;

  sdp #(.DELAY(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, exp;
    b_in = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      n   = hist.size();
      zic = (n < 3) || ($urandom_range(0, 4) == 0);
      b_in = ($urandom_range(0, 9) == 0) ? SYS_MIN : sys_t'($urandom);
      #1;
      if (zic) exp = 0;
      else begin
        exp = -hist[n-3];
        if (exp > 16383) begin exp = 16383; sat_seen++; end
      end
      if (zic) zic_seen++;
      checks++;
      if (int'(a_out) != exp) begin
        failures++; $display("FAIL i=%0d got %0d exp %0d", i, a_out, exp);
      end
      en = ($urandom_range(0, 2) != 0);
      if (en) hist.push_back(int'(b_in));
    end
    checks++;
    if (sat_seen == 0 || zic_seen == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
