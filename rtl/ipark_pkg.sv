// ipark_pkg: word formats and constants shared by the inverse Park
// transformation datapath.
//
// All external operands are fixed point. The angle theta and the voltages
// Vd and Vq are 16-bit Q1.14 words (real value = word / 2^14), theta in
// radians. The CORDIC delivers sin and cos as 20-bit Q1.18 words, and the
// ARITHMETIC stage returns Valpha and Vbeta as 32-bit words scaled by 2^29
// (Q1.14 x Q1.18 = 2^32, then an arithmetic shift right by 3).
// These widths, the Q1.14 input format, the shift by 3 and the 2^29 output
// scale come from the published design. The internal CORDIC precision
// (iteration count and guard bits) is this implementation's choice.
//
// The arctangent table and the CORDIC gain are computed at elaboration by
// constant functions:  ATAN[i] = round(atan(2^-i) * 2^frac),
//                      K(n)    = prod_{i<n} 1/sqrt(1 + 2^-2i).
`timescale 1ns/1ps
package ipark_pkg;

  localparam int THETA_W     = 16;  // angle word, Q1.14 radians
  localparam int THETA_FRAC  = 14;
  localparam int V_W         = 16;  // Vd / Vq word, Q1.14
  localparam int V_FRAC      = 14;
  localparam int SC_W        = 20;  // sin / cos word, Q1.18
  localparam int SC_FRAC     = 18;
  localparam int OUT_W       = 32;  // Valpha / Vbeta word, scale 2^29
  localparam int ARITH_SHIFT = 3;   // arithmetic right shift after the sum
  localparam int OUT_FRAC    = V_FRAC + SC_FRAC - ARITH_SHIFT;  // 29

  localparam int CORDIC_ITERS = 20; // micro-rotations
  localparam int XY_FRAC      = 21; // x/y datapath: 3 guard bits below Q1.18
  localparam int Z_FRAC       = 20; // angle accumulator fraction bits

  localparam real PI = 3.14159265358979323846;

  // round(atan(2^-i) * 2^frac)
  function automatic longint atan_const(int i, int frac);
    return longint'($atan(2.0 ** (-i)) * (2.0 ** frac) + 0.5);
  endfunction

  // round(K(n) * 2^frac), K(n) the inverse CORDIC gain after n iterations
  function automatic longint gain_const(int n, int frac);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k / $sqrt(1.0 + 2.0 ** (-2 * i));
    return longint'(k * (2.0 ** frac) + 0.5);
  endfunction

  // round(pi/2 * 2^frac) and round(pi * 2^frac)
  function automatic longint half_pi_const(int frac);
    return longint'(PI / 2.0 * (2.0 ** frac) + 0.5);
  endfunction
  function automatic longint pi_const(int frac);
    return longint'(PI * (2.0 ** frac) + 0.5);
  endfunction

endpackage
