// pll_loop_filter_tb: self-checking test of the loop-filter model.
// An up pulse of known width must raise the integrated control by KI*width
// and, while active, add KP; a dn pulse lowers it the same way; with no pulse
// the control holds; reset clears it.
`timescale 1ns/1ps
module pll_loop_filter_tb;
  localparam real KP = 0.02, KI = 1.0e-4;
  logic rst = 1'b1, up = 1'b0, dn = 1'b0;
  real  ctrl, base;
  int   checks = 0, failures = 0;

  pll_loop_filter #(.KP(KP), .KI(KI)) dut (.rst(rst), .up(up), .dn(dn), .ctrl(ctrl));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(real a, real b);
    return (a - b) * (a - b) < (2.0e-6) * (2.0e-6);
  endfunction

  initial begin
    #1 rst = 1'b0;
    #1;
    check(near(ctrl, 0.0), "zero after reset");
    up = 1'b1;
    #0.005;
    check(ctrl > KP - 1.0e-6, "proportional term while up");
    #9.995 up = 1'b0;
    #1;
    check(near(ctrl, KI * 10.0), $sformatf("integral after 10 ns up: %g", ctrl));
    base = ctrl;
    #50;
    check(near(ctrl, base), "holds with no pulse");
    dn = 1'b1;
    #0.005;
    check(ctrl < base - KP + 1.0e-6, "proportional term while dn");
    #24.995 dn = 1'b0;
    #1;
    check(near(ctrl, base - KI * 25.0), $sformatf("integral after 25 ns dn: %g", ctrl));
    rst = 1'b1;
    #1;
    check(near(ctrl, 0.0), "reset clears");
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
