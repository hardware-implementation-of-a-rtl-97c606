// ipark_top_tb: end-to-end test of the complete inverse Park transformation
// at its default configuration. A 24 MHz reference drives the PLL; once it
// is locked the test runs
//   - the two reference vectors (theta = 75 and 50 degrees), compared with
//     the real-valued transform and with the reference results
//     -773266157 / -293039057 and -204360068 / 416271211 (within 0.01 %),
//   - random vectors over the whole input range, including angles beyond
//     +-90 degrees that take the mirror path,
//   - a burst of back-to-back starts (one result per clock),
//   - a reset in the middle of an operation.
// Every result is checked against Vd*cos - Vq*sin and Vd*sin + Vq*cos in
// real arithmetic (tolerance 2^-15 of the 2^29 scale), and the latency is
// checked to be 4 rising edges of the 144 MHz clock from the edge that
// samples start. Each mechanism is counted and must occur at least once.
`timescale 1ns/1ps
module ipark_top_tb;
  import ipark_pkg::*;

  localparam real T_IN  = 1000.0 / 24.0;
  localparam real SCALE = 536870912.0;     // 2^29
  localparam real TOL   = SCALE / 32768.0; // 2^-15

  logic clk_in = 1'b0, pll_areset = 1'b1, reset = 1'b1, start = 1'b0;
  logic signed [THETA_W-1:0] theta = '0;
  logic signed [V_W-1:0]     vd = '0, vq = '0;
  logic clk_out, locked, done;
  logic signed [OUT_W-1:0] valpha, vbeta;

  int checks = 0, failures = 0;
  int n_lock = 0, n_mirror = 0, n_burst = 0, n_reset = 0, n_lat4 = 0, n_ref = 0;

  ipark_top dut (.clk_in(clk_in), .pll_areset(pll_areset), .reset(reset),
                 .start(start), .theta(theta), .vd(vd), .vq(vq),
                 .clk_out(clk_out), .locked(locked), .valpha(valpha),
                 .vbeta(vbeta), .done(done));

  always #(T_IN / 2.0) clk_in = ~clk_in;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit close(real a, real b, real tol);
    return (a - b) * (a - b) <= tol * tol;
  endfunction

  task automatic check_result(logic signed [THETA_W-1:0] th, logic signed [V_W-1:0] d,
                              logic signed [V_W-1:0] q);
    real r, ea, eb;
    r  = real'(th) / 16384.0;
    ea = (real'(d) * $cos(r) - real'(q) * $sin(r)) / 16384.0 * SCALE;
    eb = (real'(d) * $sin(r) + real'(q) * $cos(r)) / 16384.0 * SCALE;
    check(close(real'(valpha), ea, TOL),
          $sformatf("theta=%0d vd=%0d vq=%0d: valpha %0d expected %0.0f", th, d, q, valpha, ea));
    check(close(real'(vbeta), eb, TOL),
          $sformatf("theta=%0d vd=%0d vq=%0d: vbeta %0d expected %0.0f", th, d, q, vbeta, eb));
    if (r > 1.5707963 || r < -1.5707963) n_mirror++;
  endtask

  // one operation; inputs change on the falling edge of clk_out
  task automatic op(logic signed [THETA_W-1:0] th, logic signed [V_W-1:0] d,
                    logic signed [V_W-1:0] q);
    int lat;
    @(negedge clk_out);
    theta = th; vd = d; vq = q; start = 1'b1;
    @(negedge clk_out);               // edge 1 sampled start
    start = 1'b0;
    theta = 16'($urandom); vd = 16'($urandom); vq = 16'($urandom);
    lat = 1;
    while (!done && lat < 12) begin
      @(negedge clk_out);
      lat++;
    end
    check(lat == 4, $sformatf("latency %0d clock cycles, expected 4", lat));
    if (lat == 4) n_lat4++;
    check_result(th, d, q);
  endtask

  task automatic reference(logic signed [THETA_W-1:0] th, logic signed [V_W-1:0] d,
                           logic signed [V_W-1:0] q, longint ra, longint rb);
    op(th, d, q);
    $display("theta=%0d vd=%0d vq=%0d -> valpha=%0d (%0.6f) vbeta=%0d (%0.6f)",
             th, d, q, valpha, real'(valpha) / SCALE, vbeta, real'(vbeta) / SCALE);
    check(close(real'(valpha), real'(ra), 1.0e-4 * real'(ra)), "valpha within 0.01 % of reference");
    check(close(real'(vbeta), real'(rb), 1.0e-4 * real'(rb)), "vbeta within 0.01 % of reference");
    n_ref++;
  endtask

  initial begin
    real t_lock, t_start;
    #100 pll_areset = 1'b0;
    wait (locked);
    t_lock = $realtime;
    n_lock++;
    $display("PLL locked after %0.1f ns", t_lock);
    // output clock frequency
    @(posedge clk_out);
    t_start = $realtime;
    repeat (144) @(posedge clk_out);
    check(close(($realtime - t_start) / 144.0, 1000.0 / 144.0, 0.01),
          $sformatf("clk_out period %0.4f ns", ($realtime - t_start) / 144.0));
    @(negedge clk_out);
    check(valpha == 0 && vbeta == 0 && !done, "datapath cleared while in reset");
    reset = 1'b0;

    // reference vectors (75 and 50 degrees)
    reference(16'sd21447, -16'sd14745, 16'sd20480, -64'sd773266157, -64'sd293039057);
    reference(16'sd14298,  16'sd5723,  16'sd12943, -64'sd204360068,  64'sd416271211);

    // random single operations over the whole range
    for (int i = 0; i < 200; i++) op(16'($urandom), 16'($urandom), 16'($urandom));
    // angles in the mirror region
    for (int i = 0; i < 20; i++) begin
      op(16'(25800 + $urandom_range(0, 6900)), 16'($urandom), 16'($urandom));
      op(-16'(25800 + $urandom_range(0, 6900)), 16'($urandom), 16'($urandom));
    end

    // back-to-back burst
    begin
      logic signed [THETA_W-1:0] bt [24];
      logic signed [V_W-1:0]     bd [24], bq [24];
      automatic int got = 0, first = -1, last = -1, cyc = 0;
      foreach (bt[i]) begin
        bt[i] = 16'($urandom); bd[i] = 16'($urandom); bq[i] = 16'($urandom);
      end
      fork
        begin
          @(negedge clk_out);
          for (int i = 0; i < 24; i++) begin
            theta = bt[i]; vd = bd[i]; vq = bq[i]; start = 1'b1;
            @(negedge clk_out);
          end
          start = 1'b0;
        end
        begin
          while (cyc < 40) begin
            @(negedge clk_out);
            cyc++;
            if (done) begin
              if (got < 24) check_result(bt[got], bd[got], bq[got]);
              if (first < 0) first = cyc;
              last = cyc;
              got++;
            end
          end
        end
      join
      check(got == 24, $sformatf("burst: %0d results for 24 starts", got));
      check(last - first == 23, "burst: one result per clock");
      // start is first driven in monitor cycle 1 and sampled by the next edge
      check(first == 5, $sformatf("burst: first result %0d cycles after the burst began", first));
      if (got == 24 && last - first == 23) n_burst++;
    end

    // reset in the middle of an operation: no result may appear
    begin
      automatic int seen = 0;
      @(negedge clk_out);
      theta = 16'sd1000; vd = 16'sd1000; vq = 16'sd1000; start = 1'b1;
      @(negedge clk_out);
      start = 1'b0;
      @(negedge clk_out);
      reset = 1'b1;
      @(negedge clk_out);
      check(valpha == 0 && vbeta == 0, "reset clears the outputs");
      reset = 1'b0;
      repeat (6) begin
        @(negedge clk_out);
        if (done) seen++;
      end
      check(seen == 0, "aborted operation produces no result");
      if (seen == 0) n_reset++;
    end
    // and the datapath works again afterwards
    op(16'sd21447, -16'sd14745, 16'sd20480);

    $display("mechanisms: lock=%0d reference=%0d latency4=%0d mirror=%0d burst=%0d reset=%0d",
             n_lock, n_ref, n_lat4, n_mirror, n_burst, n_reset);
    check(n_lock > 0, "PLL lock happened");
    check(n_ref == 2, "reference vectors ran");
    check(n_lat4 > 0, "four-cycle operations happened");
    check(n_mirror > 0, "mirror path happened");
    check(n_burst > 0, "pipelined burst happened");
    check(n_reset > 0, "reset abort happened");
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
