// cordic_pkg: shared types and elaboration-time constants of the CORDIC
// sine/cosine unit.
//
// Angles are binary angles: a full turn of 2*pi is 2**W codes for a W-bit
// angle, so the two top bits of an unsigned input angle are its quadrant and
// a signed W-bit angle spans [-pi, pi). Coordinates x and y are signed fixed
// point with FRAC fraction bits (1.0 = 2**FRAC).
//
// The micro-rotation angles theta_n = arctan(2**-n) and the gain
// K_N = prod_{i=0}^{N-1} sqrt(1 + 2**(-2i)) follow the CORDIC equations; both
// are computed here at elaboration time from real arithmetic, so no table is
// stored in the sources. Encoding the angle as a fraction of a turn is this
// design's own choice.
package cordic_pkg;

  localparam real PI = 3.14159265358979323846;

  // Quadrant an input angle lies in, from its two top bits.
  typedef enum logic [1:0] {
    QUAD_1 = 2'd0,  // [0, pi/2)
    QUAD_2 = 2'd1,  // [pi/2, pi)
    QUAD_3 = 2'd2,  // [pi, 3pi/2)
    QUAD_4 = 2'd3   // [3pi/2, 2pi)
  } quadrant_e;

  // arctan(2**-n) in a z_w-bit binary angle (2**z_w codes per turn), rounded.
  function automatic longint atan_code(input int n, input int z_w);
    real a;
    a = $atan(2.0 ** (-n)) / (2.0 * PI) * (2.0 ** z_w);
    return longint'(a);  // real to integer conversion rounds to nearest
  endfunction

  // 1/K_N with N = iters micro-rotations, as a fixed-point value with frac
  // fraction bits, rounded. Starting the iteration at x0 = 1/K_N, y0 = 0 makes
  // the final x and y equal cos and sin without a multiplication afterwards.
  function automatic longint inv_gain_code(input int iters, input int frac);
    real k;
    k = 1.0;
    for (int i = 0; i < iters; i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return longint'((2.0 ** frac) / k);
  endfunction

endpackage
