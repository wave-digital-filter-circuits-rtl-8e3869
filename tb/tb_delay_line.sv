// tb_delay_line: drives two delay lines (1 and 7 samples) with random data and random
// enable gaps and compares their outputs, once DELAY samples have gone in, with the value
// written DELAY enabled cycles earlier, kept in a testbench history array.
module tb_delay_line;
  localparam int W = 15;
  logic clk = 0, rst = 1, en = 0;
  logic [W-1:0] din;
  logic [W-1:0] dout1, dout7;
  logic [W-1:0] hist[$];
  int checks = 0, failures = 0;

  delay_line #(.W(W), .DELAY(1)) d1 (.clk, .rst, .en, .din, .dout(dout1));
  delay_line #(.W(W), .DELAY(7)) d7 (.clk, .rst, .en, .din, .dout(dout7));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    din = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      n = hist.size();
      if (n >= 1) begin
        checks++;
        if (dout1 != hist[n-1]) begin failures++; $display("FAIL d1 i=%0d", i); end
      end
      if (n >= 7) begin
        checks++;
        if (dout7 != hist[n-7]) begin
          failures++; $display("FAIL d7 i=%0d got %h exp %h", i, dout7, hist[n-7]);
        end
      end
      en  = ($urandom_range(0, 2) != 0);
      din = W'($urandom);
      if (en) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
