// pll_pfd_tb: self-checking test of the phase frequency detector.
// Reference leading the feedback by a known time must give an up pulse of
// that width and no dn pulse; lagging gives the mirror image. Two reference
// edges before a feedback edge (frequency error) must keep up high.
// Reset forces both outputs low.
`timescale 1ns/1ps
module pll_pfd_tb;
  logic rst = 1'b0, ref_clk = 1'b0, fb_clk = 1'b0;
  logic up, dn;
  int   checks = 0, failures = 0;
  real  up_w = 0.0, dn_w = 0.0, t_up, t_dn;

  pll_pfd dut (.rst(rst), .ref_clk(ref_clk), .fb_clk(fb_clk), .up(up), .dn(dn));

  always @(posedge up) t_up = $realtime;
  always @(negedge up) up_w = up_w + ($realtime - t_up);
  always @(posedge dn) t_dn = $realtime;
  always @(negedge dn) dn_w = dn_w + ($realtime - t_dn);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one comparison: ref edge at 0, fb edge at lag (may be negative,
  // a multiple of 0.5 ns)
  task automatic pair(real lag);
    up_w = 0.0; dn_w = 0.0;
    if (lag >= 0.0) begin
      ref_clk = 1'b1; repeat (int'(lag / 0.5)) #0.5; fb_clk = 1'b1;
    end else begin
      fb_clk = 1'b1; repeat (int'(-lag / 0.5)) #0.5; ref_clk = 1'b1;
    end
    #5;
    ref_clk = 1'b0; fb_clk = 1'b0;
    #20;
    check(!up && !dn, "both low after the pair");
    if (lag >= 0.0) begin
      check(up_w > lag - 0.01 && up_w < lag + 0.01, $sformatf("up width %0.3f for lead %0.3f", up_w, lag));
      check(dn_w < 0.01, "no dn pulse when reference leads");
    end else begin
      check(dn_w > -lag - 0.01 && dn_w < -lag + 0.01, $sformatf("dn width %0.3f for lag %0.3f", dn_w, -lag));
      check(up_w < 0.01, "no up pulse when reference lags");
    end
  endtask

  initial begin
    // the flip-flops power up in any state: reset with the clocks running
    #1 rst = 1'b1;
    #1 ref_clk = 1'b1; fb_clk = 1'b1;
    #1 ref_clk = 1'b0; fb_clk = 1'b0;
    #7;
    check(!up && !dn, "reset holds outputs low");
    ref_clk = 1'b1; #1 ref_clk = 1'b0;
    check(!up, "reset blocks up");
    rst = 1'b0;
    #10;
    pair(3.0);
    pair(7.5);
    pair(-2.0);
    pair(-11.0);
    pair(0.0);
    // frequency error: two reference edges, no feedback edge
    ref_clk = 1'b1; #5 ref_clk = 1'b0; #5;
    ref_clk = 1'b1; #5 ref_clk = 1'b0; #5;
    check(up && !dn, "up stays high over missing feedback edges");
    fb_clk = 1'b1; #1;
    check(!up && !dn, "feedback edge clears both");
    fb_clk = 1'b0;
    // reset clears a pending pulse
    ref_clk = 1'b1; #1;
    check(up, "up set by reference");
    rst = 1'b1; #1;
    check(!up, "reset clears up");
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
