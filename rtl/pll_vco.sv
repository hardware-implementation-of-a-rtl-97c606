// pll_vco: behavioural model of the PLL's voltage-controlled oscillator.
// Not synthesizable.
//
// How it works. The oscillator keeps its phase (in cycles) as a real number.
// Every DT_NS nanoseconds the phase advances by f * DT_NS, with
// f = F0_GHZ + ctrl clamped to [FMIN_GHZ, FMAX_GHZ]; the output toggles each
// time the phase passes half a cycle. A higher control value therefore
// raises the frequency, as in the real part. Edges are placed on the DT_NS
// grid, so the model carries up to DT_NS of jitter.
//
// Interface. ctrl from the loop filter (GHz of frequency offset); rst holds
// the oscillator at phase 0 with the output low; clk_out is the VCO clock.
//
// From the published design: a VCO whose frequency follows the filtered PFD
// signal, running at 144 MHz when locked. Own choices: free-running
// frequency, tuning range and the time-step model.
`timescale 1ns/1ps
module pll_vco #(
  parameter real F0_GHZ   = 0.120,   // free-running frequency
  parameter real FMIN_GHZ = 0.050,
  parameter real FMAX_GHZ = 0.300,
  parameter real DT_NS    = 0.01
) (
  input  logic rst,
  input  real  ctrl,
  output logic clk_out
);
  real phase;
  initial phase = 0.0;
  real f;

  initial clk_out = 1'b0;

  always begin
    #(DT_NS);
    if (rst) begin
      phase   = 0.0;
      clk_out = 1'b0;
    end else begin
      f = F0_GHZ + ctrl;
      if (f < FMIN_GHZ) f = FMIN_GHZ;
      if (f > FMAX_GHZ) f = FMAX_GHZ;
      phase = phase + f * DT_NS;
      if (phase >= 0.5) begin
        phase   = phase - 0.5;
        clk_out = ~clk_out;
      end
    end
  end
endmodule
