// pll: behavioural model of the clock-multiplying phase-locked loop that
// clocks the inverse Park datapath (24 MHz in, 144 MHz out). Not
// synthesizable: in an FPGA this is the vendor's PLL primitive.
//
// How it works. The classic loop: the PFD (pll_pfd) compares the rising
// edges of the reference clk_in with the feedback clock, the loop filter
// (pll_loop_filter) turns the PFD's up/dn pulses into a control value, the
// VCO (pll_vco) oscillates at a frequency set by that value, and the
// divide-by-N counter (pll_divider) feeds F_out / N back to the PFD. In lock
// F_out = N * F_in.
//
// Lock indication. At every rising edge of clk_in the model measures the
// time since the last feedback edge (or to the pending one); after
// LOCK_COUNT consecutive reference cycles with a phase error below
// LOCK_TOL_NS it raises locked. Any larger error drops locked again.
//
// Interface. clk_in reference; areset (active high) resets the loop;
// clk_out is the multiplied clock (the Altera c0 output); locked as above.
//
// From the published design: the PFD / filter / VCO / divide-by-N structure,
// 24 MHz input with 50 % duty, 144 MHz output. Own choices: all loop gains,
// the free-running frequency and the lock detector.
`timescale 1ns/1ps
module pll #(
  parameter int  N           = 6,
  parameter real DT_NS       = 0.01,
  parameter real F0_GHZ      = 0.120,
  parameter real KP          = 0.02,
  parameter real KI          = 1.0e-4,
  parameter real LOCK_TOL_NS = 0.1,
  parameter int  LOCK_COUNT  = 16
) (
  input  logic clk_in,
  input  logic areset,
  output logic clk_out,
  output logic locked
);
  logic up, dn, fb_clk;
  real  ctrl;

  pll_pfd u_pfd (
    .rst(areset), .ref_clk(clk_in), .fb_clk(fb_clk), .up(up), .dn(dn)
  );

  pll_loop_filter #(.KP(KP), .KI(KI), .DT_NS(DT_NS)) u_filter (
    .rst(areset), .up(up), .dn(dn), .ctrl(ctrl)
  );

  pll_vco #(.F0_GHZ(F0_GHZ), .DT_NS(DT_NS)) u_vco (
    .rst(areset), .ctrl(ctrl), .clk_out(clk_out)
  );

  pll_divider #(.N(N)) u_div (
    .rst(areset), .clk_in(clk_out), .clk_out(fb_clk)
  );

  // ---- lock detector (behavioural) ----------------------------------------
  real t_fb;
  int  good;
  initial begin
    t_fb   = -1.0e9;
    good   = 0;
    locked = 1'b0;
  end

  always @(posedge fb_clk) t_fb <= $realtime;

  always begin : lock_detect
    int g;
    @(posedge clk_in or posedge areset);
    if (areset) begin
      good   <= 0;
      locked <= 1'b0;
    end else begin
      // feedback edge either just happened or is about to: wait a little
      #(2.0 * LOCK_TOL_NS);
      if ($realtime - t_fb <= 4.0 * LOCK_TOL_NS) g = (good < LOCK_COUNT) ? good + 1 : good;
      else                                        g = 0;
      good   <= g;
      locked <= (g >= LOCK_COUNT);
    end
  end
endmodule
