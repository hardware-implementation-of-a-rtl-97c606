// pll_tb: self-checking test of the PLL model. A 24 MHz reference drives
// the loop out of reset; the test waits for locked, then measures the output
// period over many cycles (expected 1/144 MHz = 6.944 ns), checks that the
// divided feedback edge sits on the reference edge, that locked stays high,
// and that a second reset drops locked and the loop locks again.
`timescale 1ns/1ps
module pll_tb;
  localparam real T_IN  = 1000.0 / 24.0;     // ns
  localparam real T_OUT = 1000.0 / 144.0;    // ns

  logic clk_in = 1'b0, areset = 1'b1;
  logic clk_out, locked;
  int   checks = 0, failures = 0;

  pll dut (.clk_in(clk_in), .areset(areset), .clk_out(clk_out), .locked(locked));

  always #(T_IN / 2.0) clk_in = ~clk_in;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure();
    real t0, t1, per;
    int  nlost;
    @(posedge clk_out);
    t0 = $realtime;
    nlost = 0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk_out);
      if (!locked) nlost++;
    end
    t1  = $realtime;
    per = (t1 - t0) / 600.0;
    $display("output period %0.4f ns (%0.3f MHz)", per, 1000.0 / per);
    check(per > T_OUT - 0.01 && per < T_OUT + 0.01, "output period is 1/144 MHz");
    check(nlost == 0, "locked stays high");
    // feedback (divided) edge aligned to reference edge
    @(posedge clk_in);
    t0 = $realtime;
    @(posedge dut.fb_clk);
    t1 = $realtime;
    check((t1 - t0) < 0.2 || (T_IN - (t1 - t0)) < 0.2, "feedback edge on reference edge");
  endtask

  initial begin
    real tl;
    #100 areset = 1'b0;
    check(locked == 1'b0, "not locked right after reset");
    wait (locked);
    tl = $realtime;
    $display("locked after %0.1f ns", tl - 100.0);
    check(tl < 40000.0, "lock within 40 us");
    measure();
    // reset again: locked must drop and come back
    areset = 1'b1;
    #50;
    check(locked == 1'b0, "locked drops on reset");
    areset = 1'b0;
    wait (locked);
    measure();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
