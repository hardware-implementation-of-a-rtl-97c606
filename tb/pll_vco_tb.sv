// pll_vco_tb: self-checking test of the VCO model. For several control
// values the output frequency, measured over 200 cycles, must equal
// F0 + ctrl, clamped at the tuning-range limits; reset stops the output.
`timescale 1ns/1ps
module pll_vco_tb;
  localparam real F0 = 0.120;
  logic rst = 1'b1;
  real  ctrl = 0.0;
  logic clk_out;
  int   checks = 0, failures = 0;

  pll_vco dut (.rst(rst), .ctrl(ctrl), .clk_out(clk_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic freq(real c, real expect_ghz);
    real t0, f;
    ctrl = c;
    repeat (3) @(posedge clk_out);
    t0 = $realtime;
    repeat (200) @(posedge clk_out);
    f = 200.0 / ($realtime - t0);
    check(f > expect_ghz * 0.999 && f < expect_ghz * 1.001,
          $sformatf("ctrl %0.3f: %0.5f GHz, expected %0.5f", c, f, expect_ghz));
  endtask

  initial begin
    #20;
    check(clk_out == 1'b0, "reset holds output low");
    rst = 1'b0;
    freq(0.0, F0);
    freq(0.024, 0.144);
    freq(-0.030, 0.090);
    freq(1.0, 0.300);
    freq(-1.0, 0.050);
    rst = 1'b1;
    #1;
    check(clk_out == 1'b0, "reset stops output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
