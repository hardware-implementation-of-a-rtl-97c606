// cordic_iter: one rotation-mode CORDIC micro-rotation, purely combinational.
//
// Given (x, y, z) it rotates the vector by +-atan(2^-SHIFT) in the direction
// that drives the residual angle z towards zero:
//   d = sign(z);  x' = x - d*(y >>> SHIFT);  y' = y + d*(x >>> SHIFT);
//   z' = z - d*ATAN.
// The shifts are arithmetic, so no multiplier is needed. ATAN is the
// elaboration-time constant atan(2^-SHIFT) in the angle word's format.
// Chained copies of this module form the unrolled CORDIC array in cordic.sv.
`timescale 1ns/1ps
module cordic_iter #(
  parameter int     XY_W  = 24,
  parameter int     Z_W   = 24,
  parameter int     SHIFT = 0,
  parameter longint ATAN  = 823550   // atan(1) * 2^20
) (
  input  logic signed [XY_W-1:0] x_i,
  input  logic signed [XY_W-1:0] y_i,
  input  logic signed [Z_W-1:0]  z_i,
  output logic signed [XY_W-1:0] x_o,
  output logic signed [XY_W-1:0] y_o,
  output logic signed [Z_W-1:0]  z_o
);
  localparam logic signed [Z_W-1:0] ATAN_W = Z_W'(ATAN);

  logic signed [XY_W-1:0] x_sh, y_sh;
  assign x_sh = x_i >>> SHIFT;
  assign y_sh = y_i >>> SHIFT;

  always_comb begin
    if (z_i[Z_W-1]) begin           // z < 0: rotate clockwise
      x_o = x_i + y_sh;
      y_o = y_i - x_sh;
      z_o = z_i + ATAN_W;
    end else begin                  // z >= 0: rotate counter-clockwise
      x_o = x_i - y_sh;
      y_o = y_i + x_sh;
      z_o = z_i - ATAN_W;
    end
  end
endmodule
