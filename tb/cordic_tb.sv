// cordic_tb: self-checking test of the sin/cos CORDIC.
// Single operations on corner angles (0, +-pi/2, the mirror region up to
// +-2 rad, the 75 and 50 degree angles of the reference vectors) and random
// angles, each checked against $sin/$cos of the same Q1.14 angle within
// TOL LSB of Q1.18, with the start-to-done latency checked at 3 clock
// edges. A burst of back-to-back starts checks that the pipeline takes one
// angle per cycle. Reset must clear the outputs.
`timescale 1ns/1ps
module cordic_tb;
  import ipark_pkg::*;

  localparam int TOL = 6;   // LSB of 2^-18

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic signed [THETA_W-1:0] theta = '0;
  logic signed [SC_W-1:0]    sin_o, cos_o;
  logic                      done_o;
  int checks = 0, failures = 0, n_mirror = 0, max_err = 0;

  cordic dut (.clk(clk), .rst(rst), .start(start), .theta(theta),
              .sin_o(sin_o), .cos_o(cos_o), .done_o(done_o));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_val(logic signed [THETA_W-1:0] th,
                           logic signed [SC_W-1:0] s, logic signed [SC_W-1:0] c);
    real r;
    int  es, ec;
    r  = real'(th) / 16384.0;
    es = int'(real'(s) - $sin(r) * 262144.0);
    ec = int'(real'(c) - $cos(r) * 262144.0);
    if (es < 0) es = -es;
    if (ec < 0) ec = -ec;
    if (es > max_err) max_err = es;
    if (ec > max_err) max_err = ec;
    check(es <= TOL, $sformatf("sin(%0d) = %0d, error %0d LSB", th, s, es));
    check(ec <= TOL, $sformatf("cos(%0d) = %0d, error %0d LSB", th, c, ec));
    if (r > 3.14159265 / 2 || r < -3.14159265 / 2) n_mirror++;
  endtask

  task automatic one(logic signed [THETA_W-1:0] th);
    int lat;
    @(negedge clk);
    theta = th;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    theta = 16'($urandom);   // must not matter any more
    lat = 1;
    while (!done_o && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 3, $sformatf("latency %0d edges, expected 3", lat));
    check_val(th, sin_o, cos_o);
    @(negedge clk);
    check(!done_o, "done is a single-cycle pulse");
  endtask

  initial begin
    logic signed [THETA_W-1:0] burst [16];
    #22 rst = 1'b0;
    check(sin_o == 0 && cos_o == 0 && !done_o, "outputs cleared by reset");
    one(16'sd0);
    one(16'sd21447);    // 75 degrees
    one(16'sd14298);    // 50 degrees
    one(16'sd25736);    // pi/2
    one(-16'sd25736);
    one(16'sd25737);    // just past pi/2: mirror
    one(-16'sd25737);
    one(16'sd32767);    // ~ +2 rad
    one(-16'sd32768);   // -2 rad
    for (int i = 0; i < 300; i++) one(16'($urandom));
    // back-to-back burst
    foreach (burst[i]) burst[i] = 16'($urandom);
    begin
      automatic int got = 0, first = -1, last = -1, cyc = 0;
      fork
        begin
          @(negedge clk);
          for (int i = 0; i < 16; i++) begin
            theta = burst[i];
            start = 1'b1;
            @(negedge clk);
          end
          start = 1'b0;
        end
        begin
          while (cyc < 40) begin
            @(negedge clk);
            cyc++;
            if (done_o) begin
              if (got < 16) check_val(burst[got], sin_o, cos_o);
              if (first < 0) first = cyc;
              last = cyc;
              got++;
            end
          end
        end
      join
      check(got == 16, $sformatf("burst: one result per start (%0d)", got));
      check(last - first == 15, "burst: 16 results in consecutive cycles");
    end
    // reset mid-operation
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    check(sin_o == 0 && cos_o == 0 && !done_o, "reset clears outputs");
    rst = 1'b0;
    check(n_mirror > 10, "mirror region exercised");
    $display("max error %0d LSB, mirror cases %0d", max_err, n_mirror);
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
