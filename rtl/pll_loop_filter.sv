// pll_loop_filter: behavioural model of the PLL's analog loop filter
// (charge pump with a series R-C filter). Not synthesizable.
//
// How it works. The PFD's up/dn pulses switch a charge pump onto the filter.
// The model keeps the capacitor's charge as a real number that integrates
// KI per nanosecond of up (minus dn) pulse, and adds a proportional term KP
// while a pulse is active (the voltage across the series resistor). The
// control output is expressed directly as a frequency offset in GHz for the
// VCO model, so the VCO gain is folded into KI and KP. The integrator is
// updated every DT_NS nanoseconds.
//
// Interface. up, dn from the PFD; rst clears the integrator; ctrl is the
// control "voltage" (real, GHz of frequency offset).
//
// From the published design: a loop filter between PFD and VCO. Own choices:
// filter type, gains and the time-step model.
`timescale 1ns/1ps
module pll_loop_filter #(
  parameter real KP    = 0.02,    // GHz offset while a pulse is active
  parameter real KI    = 1.0e-4,  // GHz per ns of net pump pulse
  parameter real DT_NS = 0.01     // integration step
) (
  input  logic rst,
  input  logic up,
  input  logic dn,
  output real  ctrl
);
  real integ;
  initial integ = 0.0;

  function automatic real pump(logic u, logic d);
    return (u ? 1.0 : 0.0) - (d ? 1.0 : 0.0);
  endfunction

  always begin
    #(DT_NS);
    if (rst) integ = 0.0;
    else     integ = integ + KI * pump(up, dn) * DT_NS;
  end

  always_comb ctrl = integ + KP * pump(up, dn);
endmodule
