// ipark_arith_tb: self-checking test of the ARITHMETIC stage.
// Random and extreme sin/cos/Vd/Vq words are applied with in_valid; the
// outputs one clock later are compared with
//   ((Vd*cos - Vq*sin) >>> 3) and ((Vd*sin + Vq*cos) >>> 3)
// computed in 64-bit integers, and with the real-valued transform (scale
// 2^29) for the two reference vectors (75 and 50 degrees). The outputs must
// hold while in_valid is low and clear on reset.
`timescale 1ns/1ps
module ipark_arith_tb;
  import ipark_pkg::*;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [SC_W-1:0]  sin_i = '0, cos_i = '0;
  logic signed [V_W-1:0]   vd = '0, vq = '0;
  logic signed [OUT_W-1:0] valpha, vbeta;
  logic                    out_valid;
  int checks = 0, failures = 0;

  ipark_arith dut (.clk(clk), .rst(rst), .in_valid(in_valid), .sin_i(sin_i),
                   .cos_i(cos_i), .vd(vd), .vq(vq), .valpha(valpha),
                   .vbeta(vbeta), .out_valid(out_valid));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(int s, int c, int d, int q);
    longint ea, eb;
    @(negedge clk);
    sin_i = SC_W'(s); cos_i = SC_W'(c); vd = V_W'(d); vq = V_W'(q);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    ea = (longint'(vd) * longint'(cos_i) - longint'(vq) * longint'(sin_i)) >>> 3;
    eb = (longint'(vd) * longint'(sin_i) + longint'(vq) * longint'(cos_i)) >>> 3;
    check(out_valid, "out_valid one clock after in_valid");
    check(longint'(valpha) == ea, $sformatf("valpha %0d expected %0d", valpha, ea));
    check(longint'(vbeta) == eb, $sformatf("vbeta %0d expected %0d", vbeta, eb));
  endtask

  task automatic reference(real vdr, real vqr, real deg);
    real th, ra, rb;
    th = deg * 3.14159265358979 / 180.0;
    apply(int'($sin(th) * 262144.0), int'($cos(th) * 262144.0),
          int'(vdr * 16384.0), int'(vqr * 16384.0));
    ra = (vdr * $cos(th) - vqr * $sin(th)) * 536870912.0;
    rb = (vdr * $sin(th) + vqr * $cos(th)) * 536870912.0;
    $display("Vd=%0.2f Vq=%0.2f theta=%0.0f deg: valpha=%0d (%0.6f) vbeta=%0d (%0.6f)",
             vdr, vqr, deg, valpha, real'(valpha) / 536870912.0, vbeta,
             real'(vbeta) / 536870912.0);
    check((real'(valpha) - ra) ** 2 < (1.0e-4 * 536870912.0) ** 2, "valpha matches real transform");
    check((real'(vbeta) - rb) ** 2 < (1.0e-4 * 536870912.0) ** 2, "vbeta matches real transform");
  endtask

  initial begin
    logic signed [OUT_W-1:0] ha, hb;
    #22 rst = 1'b0;
    check(valpha == 0 && vbeta == 0 && !out_valid, "outputs cleared by reset");
    reference(-0.9, 1.25, 75.0);
    reference(0.35, 0.79, 50.0);
    // extremes: full-scale voltages, sin/cos of magnitude 1 and sqrt(1/2)
    apply(185364, 185364, 32767, -32768);
    apply(-185364, 185364, -32768, -32768);
    apply(262144, 0, 32767, 32767);
    apply(0, -262144, -32768, 32767);
    for (int i = 0; i < 500; i++) begin
      int ang;
      real th;
      ang = int'($urandom_range(0, 65535)) - 32768;
      th  = real'(ang) / 16384.0;
      apply(int'($sin(th) * 262144.0), int'($cos(th) * 262144.0),
            int'($urandom), int'($urandom));
    end
    // hold while in_valid is low
    ha = valpha; hb = vbeta;
    @(negedge clk);
    sin_i = 20'sd1000; vd = 16'sd5;
    repeat (3) @(negedge clk);
    check(valpha == ha && vbeta == hb && !out_valid, "outputs hold without in_valid");
    rst = 1'b1;
    @(negedge clk);
    check(valpha == 0 && vbeta == 0, "reset clears outputs");
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
