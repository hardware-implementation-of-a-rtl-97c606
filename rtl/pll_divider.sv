// pll_divider: divide-by-N counter in the PLL's feedback path.
//
// How it works. A modulo-N counter advances on every rising edge of clk_in;
// the output is high while the next count is below N/2, which gives a
// 50 % duty cycle for even N (N/2 cycles high for odd N). With N = 6 the
// 144 MHz VCO clock is brought down to the 24 MHz reference so that the PFD
// can compare them; the loop then settles at F_out = N * F_in.
//
// Interface and timing. clk_out rises on the clk_in edge that wraps the
// counter to 0, i.e. once every N input cycles. rst (asynchronous, active
// high) loads the counter with N-1 and clears the output, so the first
// input edge after reset starts a full output period. N must be at least 2.
//
// From the published design: a divide-by-N counter in the feedback loop, 24 MHz
// in and 144 MHz out (so N = 6). Own choices: counter encoding, duty cycle and
// reset.
`timescale 1ns/1ps
module pll_divider #(
  parameter int N = 6
) (
  input  logic rst,
  input  logic clk_in,
  output logic clk_out
);
  localparam int CW = (N > 2) ? $clog2(N) : 1;

  logic [CW-1:0] cnt, cnt_n;

  always_comb cnt_n = (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) begin
      cnt     <= CW'(N - 1);
      clk_out <= 1'b0;
    end else begin
      cnt     <= cnt_n;
      clk_out <= (cnt_n < CW'(N / 2));
    end
  end
endmodule
