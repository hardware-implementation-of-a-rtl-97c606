// pll_divider_tb: self-checking test of the divide-by-N counter.
// Runs the default (N = 6) and N = 5 and N = 2 instances from one input
// clock and checks, for each, the number of input cycles between output
// rising edges (N) and the number of input edges the output is high (N/2).
`timescale 1ns/1ps
module pll_divider_tb;
  logic rst = 1'b1, clk = 1'b0;
  logic o6, o5, o2;
  int   checks = 0, failures = 0;

  pll_divider          u6 (.rst(rst), .clk_in(clk), .clk_out(o6));
  pll_divider #(.N(5)) u5 (.rst(rst), .clk_in(clk), .clk_out(o5));
  pll_divider #(.N(2)) u2 (.rst(rst), .clk_in(clk), .clk_out(o2));

  always #3.4722 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // count input rising edges per output period and high time, at negedges
  task automatic watch(int n, int which);
    int per, hi;
    logic prev, cur;
    prev = 1'b0;
    per = -1; hi = 0;
    for (int c = 0; c < 20 * n; c++) begin
      @(negedge clk);
      cur = (which == 6) ? o6 : (which == 5) ? o5 : o2;
      if (cur && !prev) begin
        if (per >= 0) begin
          check(per == n, $sformatf("N=%0d: period %0d input cycles", n, per));
          check(hi == n / 2, $sformatf("N=%0d: high for %0d cycles", n, hi));
        end
        per = 0; hi = 0;
      end
      if (per >= 0) begin
        per++;
        if (cur) hi++;
      end
      prev = cur;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(!o6 && !o5 && !o2, "reset holds outputs low");
    rst = 1'b0;
    fork
      watch(6, 6);
      watch(5, 5);
      watch(2, 2);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
