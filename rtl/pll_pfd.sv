// pll_pfd: phase frequency detector of the clock-multiplying PLL.
//
// How it works. Two flip-flops with their D inputs tied high. A rising edge
// of ref_clk sets up, a rising edge of fb_clk sets dn. As soon as both are set,
// the AND of the two clears both asynchronously. up therefore stays high for
// the time by which the reference leads the feedback, and dn for the time by
// which it lags. Because a flip-flop stays set until the other input's edge
// arrives, the detector also reports frequency error, not only phase error,
// which lets the loop pull in from far off.
//
// Interface and timing. up/dn are pulse-width coded; rst (active high)
// forces both low. The clear path through up & dn is the intended
// asynchronous feedback of this circuit, not a combinational loop in the data
// path; its pulse width in silicon is set by the gate delays.
//
// From the published design: a PFD that aligns the reference's rising edge with
// the feedback clock's and drives the loop filter. Own choices: the classic
// two-flip-flop circuit and the reset input.
`timescale 1ns/1ps
module pll_pfd (
  input  logic rst,
  input  logic ref_clk,
  input  logic fb_clk,
  output logic up,
  output logic dn
);
  logic clr;
  assign clr = rst | (up & dn);

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge fb_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end
endmodule
