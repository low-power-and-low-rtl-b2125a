// csf_pkg: shared constants and types of the approximate composited-stair
// function (ApproxCSF) exponential and hyperbolic units.
//
// All inputs are 16-bit two's complement fixed point s4.11 (sign, 4 integer
// bits, 11 fraction bits). The argument is reduced by N = floor(z * 32/ln2),
// N is split into a quotient m = N / 32 and a remainder j = N mod 32, and the
// result is rebuilt as 2^(m + j/32) * (1 +/- eps) with eps = z - N * ln2/32.
// The constant formats (32/ln2 in s6.9, ln2/32 in s1.16 or s1.18) follow the
// published block diagrams; every constant is rounded to nearest.
package csf_pkg;

  // Input argument format s4.11.
  localparam int unsigned Z_W    = 16;
  localparam int unsigned Z_FRAC = 11;

  // 32/ln2 = 46.16624... in s6.9: round(46.16624 * 2^9) = 23637.
  localparam int unsigned C1_FRAC = 9;
  localparam logic signed [15:0] C1 = 16'sd23637;

  // The product z * C1 carries Z_FRAC + C1_FRAC = 20 fraction bits.
  localparam int unsigned P1_FRAC = Z_FRAC + C1_FRAC;

  // ln2/32 = 0.0216608... in s1.16 (separate e^-z / e^+z units) and in
  // s1.18 (combined e^+-z unit): round(x * 2^16) = 1420, round(x * 2^18) = 5678.
  localparam logic signed [17:0] C2_Q16 = 18'sd1420;
  localparam logic signed [19:0] C2_Q18 = 20'sd5678;

  // Fraction bits of the table and decoder words (s1.14).
  localparam int unsigned T_FRAC = 14;

  // Width of the integer N (s10) and of the quotient actually decoded.
  localparam int unsigned N_W = 11;
  localparam int unsigned M_W = 4;
  localparam int unsigned J_W = 5;

  typedef logic signed [Z_W-1:0] z_t;   // s4.11 argument
  typedef logic signed [N_W-1:0] n_t;   // s10 integer N

endpackage
