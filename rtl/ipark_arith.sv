// ipark_arith: the ARITHMETIC stage that completes the inverse Park
// transformation once sin(theta) and cos(theta) are known:
//   Valpha = Vd*cos(theta) - Vq*sin(theta)
//   Vbeta  = Vd*sin(theta) + Vq*cos(theta)
//
// How it works. Four signed 16 x 20 multipliers form the products of the
// Q1.14 voltages and the Q1.18 sin/cos words (scale 2^32). A subtractor and
// an adder combine them, and an arithmetic shift right by ARITH_SHIFT (3)
// brings the sum to the 32-bit output scale 2^29, copying the sign bit into
// the vacated upper positions. The output register loads through a
// multiplexer: a new result when in_valid is high, otherwise it holds.
// With |Vd|, |Vq| < 2 the true result is below 2*sqrt(2), which fits the
// 32-bit output (2.83 * 2^29 < 2^31), so the top bits are simply dropped.
//
// Timing. One register: result and out_valid appear one clock after
// in_valid. Vd and Vq are read in the cycle in_valid is high and must be
// stable then. rst (asynchronous, active high) clears the outputs to 0.
//
// From the published design: 20-bit sin/cos times 16-bit Vd/Vq, add and
// subtract, arithmetic right shift by 3 with sign fill, 32-bit outputs.
// Own choices: single output register, valid/hold handshake, asynchronous
// reset.
`timescale 1ns/1ps
module ipark_arith
  import ipark_pkg::*;
#(
  parameter int V_W_P   = V_W,
  parameter int SC_W_P  = SC_W,
  parameter int OUT_W_P = OUT_W,
  parameter int SHIFT   = ARITH_SHIFT
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic signed [SC_W_P-1:0]  sin_i,
  input  logic signed [SC_W_P-1:0]  cos_i,
  input  logic signed [V_W_P-1:0]   vd,
  input  logic signed [V_W_P-1:0]   vq,
  output logic signed [OUT_W_P-1:0] valpha,
  output logic signed [OUT_W_P-1:0] vbeta,
  output logic                      out_valid
);
  localparam int P_W = V_W_P + SC_W_P;   // product width
  localparam int S_W = P_W + 1;          // sum width

  logic signed [P_W-1:0] p_dc, p_qs, p_ds, p_qc;
  logic signed [S_W-1:0] s_alpha, s_beta;

  always_comb begin
    p_dc     = P_W'(vd) * P_W'(cos_i);
    p_qs     = P_W'(vq) * P_W'(sin_i);
    p_ds     = P_W'(vd) * P_W'(sin_i);
    p_qc     = P_W'(vq) * P_W'(cos_i);
    s_alpha  = S_W'(p_dc) - S_W'(p_qs);
    s_beta   = S_W'(p_ds) + S_W'(p_qc);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      valpha    <= '0;
      vbeta     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        valpha <= OUT_W_P'(s_alpha >>> SHIFT);
        vbeta  <= OUT_W_P'(s_beta >>> SHIFT);
      end
    end
  end

endmodule
