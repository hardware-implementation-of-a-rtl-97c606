// cordic: sine and cosine of a Q1.14 angle by rotation-mode CORDIC, in three
// clock cycles.
//
// How it works. The angle theta (radians, Q1.14, so -2.0 <= theta < 2.0) is
// first folded into [-pi/2, pi/2] with the mirror identities
//   theta >  pi/2:  sin(theta) = sin(pi - theta),  cos(theta) = -cos(pi - theta)
//   theta < -pi/2:  sin(theta) = sin(-pi - theta), cos(theta) = -cos(-pi - theta)
// The folded angle is the start value z0 of the residual-angle register, and
// the vector starts at (x, y) = (K, 0), K being the inverse CORDIC gain, so no
// gain correction is needed afterwards. ITERS micro-rotations (cordic_iter)
// then rotate the vector onto theta: x -> cos, y -> sin. The iterations are
// unrolled and split into two halves, each followed by a register. The result
// is rounded to Q1.18 and cos is negated for folded angles.
//
// Timing. Pipeline of three registers; every stage takes new data each cycle.
//   edge 1: start sampled high -> folded angle and (K, 0) registered
//   edge 2: first ITERS/2 micro-rotations registered
//   edge 3: remaining micro-rotations, rounding, mirror sign -> sin_o, cos_o,
//           done_o high for one cycle
// sin_o/cos_o hold their value until the next result. rst (asynchronous,
// active high) clears every register to 0.
//
// From the published design: rotation-mode CORDIC for sin/cos, a start and a
// reset input with registers cleared to 0 by reset, 16-bit Q1.14 angle input
// limited to +-90 degrees with mirror properties for other angles, 20-bit
// sin/cos outputs. Own choices: Q1.18 output format (inferred from the 2^29
// output scale), 20 iterations with 3 guard bits, asynchronous reset, and the
// split into three pipeline registers that makes up the overall four-cycle
// latency together with the ARITHMETIC register.
`timescale 1ns/1ps
module cordic
  import ipark_pkg::*;
#(
  parameter int THETA_W_P    = THETA_W,
  parameter int THETA_FRAC_P = THETA_FRAC,
  parameter int SC_W_P       = SC_W,
  parameter int SC_FRAC_P    = SC_FRAC,
  parameter int ITERS        = CORDIC_ITERS,
  parameter int XY_FRAC_P    = XY_FRAC,
  parameter int Z_FRAC_P     = Z_FRAC
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic signed [THETA_W_P-1:0] theta,
  output logic signed [SC_W_P-1:0] sin_o,
  output logic signed [SC_W_P-1:0] cos_o,
  output logic                     done_o
);
  localparam int XY_W = XY_FRAC_P + 3;   // range +-4
  localparam int Z_W  = Z_FRAC_P + 4;    // range +-8 (holds pi and 2.0)
  localparam int HALF = ITERS / 2;
  localparam int RND  = XY_FRAC_P - SC_FRAC_P;

  localparam logic signed [Z_W-1:0]  HALF_PI = Z_W'(half_pi_const(Z_FRAC_P));
  localparam logic signed [Z_W-1:0]  PI_Z    = Z_W'(pi_const(Z_FRAC_P));
  localparam logic signed [XY_W-1:0] K0      = XY_W'(gain_const(ITERS, XY_FRAC_P));

  // ---- stage 0: mirror folding --------------------------------------------
  logic signed [Z_W-1:0] z_in, z_fold;
  logic                  neg_in;

  always_comb begin
    z_in = Z_W'(theta) <<< (Z_FRAC_P - THETA_FRAC_P);
    if (z_in > HALF_PI) begin
      z_fold = PI_Z - z_in;
      neg_in = 1'b1;
    end else if (z_in < -HALF_PI) begin
      z_fold = -PI_Z - z_in;
      neg_in = 1'b1;
    end else begin
      z_fold = z_in;
      neg_in = 1'b0;
    end
  end

  logic signed [XY_W-1:0] x0_q, y0_q, x1_q, y1_q;
  logic signed [Z_W-1:0]  z0_q, z1_q;
  logic                   v0_q, v1_q, neg0_q, neg1_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      x0_q <= '0; y0_q <= '0; z0_q <= '0; neg0_q <= 1'b0; v0_q <= 1'b0;
    end else begin
      v0_q <= start;
      if (start) begin
        x0_q   <= K0;
        y0_q   <= '0;
        z0_q   <= z_fold;
        neg0_q <= neg_in;
      end
    end
  end

  // ---- unrolled micro-rotations -------------------------------------------
  logic signed [XY_W-1:0] xi [ITERS];
  logic signed [XY_W-1:0] yi [ITERS];
  logic signed [Z_W-1:0]  zi [ITERS];
  logic signed [XY_W-1:0] xo [ITERS];
  logic signed [XY_W-1:0] yo [ITERS];
  logic signed [Z_W-1:0]  zo [ITERS];

  for (genvar i = 0; i < ITERS; i++) begin : g_iter
    if (i == 0) begin : g_in0
      assign xi[i] = x0_q; assign yi[i] = y0_q; assign zi[i] = z0_q;
    end else if (i == HALF) begin : g_in1
      assign xi[i] = x1_q; assign yi[i] = y1_q; assign zi[i] = z1_q;
    end else begin : g_chain
      assign xi[i] = xo[i-1]; assign yi[i] = yo[i-1]; assign zi[i] = zo[i-1];
    end
    cordic_iter #(
      .XY_W (XY_W),
      .Z_W  (Z_W),
      .SHIFT(i),
      .ATAN (atan_const(i, Z_FRAC_P))
    ) u_iter (
      .x_i(xi[i]), .y_i(yi[i]), .z_i(zi[i]),
      .x_o(xo[i]), .y_o(yo[i]), .z_o(zo[i])
    );
  end

  // ---- stage 1 register (middle of the array) -----------------------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      x1_q <= '0; y1_q <= '0; z1_q <= '0; neg1_q <= 1'b0; v1_q <= 1'b0;
    end else begin
      v1_q <= v0_q;
      if (v0_q) begin
        x1_q   <= xo[HALF-1];
        y1_q   <= yo[HALF-1];
        z1_q   <= zo[HALF-1];
        neg1_q <= neg0_q;
      end
    end
  end

  // ---- stage 2: rounding to Q1.18 and mirror sign -------------------------
  localparam logic signed [XY_W-1:0] HALF_LSB = XY_W'(1 << (RND - 1));
  logic signed [SC_W_P-1:0] x_rnd, sin_n, cos_n;

  always_comb begin
    x_rnd = SC_W_P'((xo[ITERS-1] + HALF_LSB) >>> RND);
    sin_n = SC_W_P'((yo[ITERS-1] + HALF_LSB) >>> RND);
    cos_n = neg1_q ? -x_rnd : x_rnd;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sin_o <= '0; cos_o <= '0; done_o <= 1'b0;
    end else begin
      done_o <= v1_q;
      if (v1_q) begin
        sin_o <= sin_n;
        cos_o <= cos_n;
      end
    end
  end

endmodule
