// ipark_top: inverse Park transformation for field-oriented control of a
// PMSM servo drive, from rotor angle and d-q voltages to alpha-beta voltages:
//   Valpha = Vd*cos(theta) - Vq*sin(theta),  Vbeta = Vd*sin(theta) + Vq*cos(theta)
//
// Structure. A PLL multiplies the 24 MHz board clock by N = 6 to 144 MHz;
// that clock runs everything else. The CORDIC computes sin(theta) and
// cos(theta) (Q1.18) in three cycles; the ARITHMETIC stage multiplies them
// with Vd and Vq, adds/subtracts and shifts right by 3, one more cycle.
// Vd and Vq are captured with theta on start and carried along a three-stage
// delay line so that each result uses the voltages of its own start; the
// datapath is therefore fully pipelined and accepts a new start every cycle.
//
// Interface. theta, vd, vq: signed Q1.14 (theta in radians, -2.0 .. 2.0,
// angles beyond +-pi/2 handled by mirroring). valpha, vbeta: signed 32-bit,
// real value = word / 2^29. start is sampled on rising edges of clk_out;
// done pulses for one cycle when valpha/vbeta are updated, which is 4 rising
// edges after the edge that sampled start. reset (active high) clears all
// datapath registers; the datapath is also held in reset while the PLL is
// not locked. pll_areset resets the PLL itself.
//
// Clocking of inputs. start, theta, vd and vq are sampled by clk_out; drive
// them synchronously to clk_out (which is brought out for that purpose).
//
// From the published design: the PLL -> CORDIC -> ARITHMETIC structure, the
// 24/144 MHz clocks, the word widths, the start and reset inputs and the
// four-cycle latency. Own choices: the Vd/Vq delay line, holding the
// datapath in reset until lock, the pll_areset and locked ports. The PLL is
// a behavioural model, so this top is for simulation; for an FPGA, replace
// pll with the vendor PLL primitive.
`timescale 1ns/1ps
module ipark_top
  import ipark_pkg::*;
(
  input  logic                      clk_in,
  input  logic                      pll_areset,
  input  logic                      reset,
  input  logic                      start,
  input  logic signed [THETA_W-1:0] theta,
  input  logic signed [V_W-1:0]     vd,
  input  logic signed [V_W-1:0]     vq,
  output logic                      clk_out,
  output logic                      locked,
  output logic signed [OUT_W-1:0]   valpha,
  output logic signed [OUT_W-1:0]   vbeta,
  output logic                      done
);
  localparam int CORDIC_LAT = 3;

  logic rst_core;
  logic signed [SC_W-1:0] sin_t, cos_t;
  logic                   cs_valid;

  pll u_pll (
    .clk_in (clk_in),
    .areset (pll_areset),
    .clk_out(clk_out),
    .locked (locked)
  );

  assign rst_core = reset | ~locked;

  cordic u_cordic (
    .clk   (clk_out),
    .rst   (rst_core),
    .start (start),
    .theta (theta),
    .sin_o (sin_t),
    .cos_o (cos_t),
    .done_o(cs_valid)
  );

  // Vd/Vq travel alongside the CORDIC pipeline
  logic signed [V_W-1:0] vd_d [CORDIC_LAT];
  logic signed [V_W-1:0] vq_d [CORDIC_LAT];

  always_ff @(posedge clk_out or posedge rst_core) begin
    if (rst_core) begin
      for (int i = 0; i < CORDIC_LAT; i++) begin
        vd_d[i] <= '0;
        vq_d[i] <= '0;
      end
    end else begin
      vd_d[0] <= vd;
      vq_d[0] <= vq;
      for (int i = 1; i < CORDIC_LAT; i++) begin
        vd_d[i] <= vd_d[i-1];
        vq_d[i] <= vq_d[i-1];
      end
    end
  end

  ipark_arith u_arith (
    .clk      (clk_out),
    .rst      (rst_core),
    .in_valid (cs_valid),
    .sin_i    (sin_t),
    .cos_i    (cos_t),
    .vd       (vd_d[CORDIC_LAT-1]),
    .vq       (vq_d[CORDIC_LAT-1]),
    .valpha   (valpha),
    .vbeta    (vbeta),
    .out_valid(done)
  );

endmodule
