// lti_pkg: number formats and default constants shared by the LTI filter structures.
//
// Data are W-bit signed two's complement integers that wrap on overflow. Constants are
// CW-bit signed fixed point with FRAC fractional bits (Q2.14 by default, range [-2, 2)).
// A constant product c*v is formed exactly, rounded to nearest (add 2^(FRAC-1), shift right
// arithmetically by FRAC) and truncated to W bits. The word length W = 16 is one of the
// three word lengths the method was evaluated at (8, 16 and 32 bits); the constant format
// and the rounding are this design's choices.
//
// Default constants. Three of the structures (modified Direct Form II, second companion
// form, diagonal form) realise the same example 8th-order transfer function, chosen for
// this design:
//   H(z) = d + sum_i r_i z^-1 / (1 - p_i z^-1)
//   p = {0.75, -0.6, 0.5, -0.4, 0.3, -0.2, 0.1, -0.05}
//   r = {0.25, 0.125, -0.125, 0.25, 0.0625, -0.0625, 0.125, 0.125},  d = 0.5
// Written as a Direct Form II ratio H = (b0 + b1 z^-1 + ... + bN z^-N) /
// (1 - a1 z^-1 - ... - aN z^-N):  A(z) = prod_i (1 - p_i z^-1),
// B(z) = d*A(z) + z^-1 * sum_i r_i prod_{k!=i} (1 - p_k z^-1).
// Every constant below is round(value * 2^FRAC):
//   modified Direct Form II (state s1 is index 0):
//     y = b0*x + s1
//     s1:  CS = a1 + b1/b0,      CX = a1*b0 + b1
//     s2:  CS = a1,              CX = a1*b0
//     s_{2j+1} (j = 1..N-1): CS = a_{j+1},     CX = a_{j+1}*b0
//     s_{2j+2} (j = 1..N-1): CS = b_{j+1}/b0,  CX = b_{j+1}
//   second companion form:  CA_j = a_j,  CX_j = b_j + a_j*b0,  CY = b0
//   diagonal form:          LAMBDA_i = p_i,  C_i = r_i,  D = d
// The Jordan form has its own example system: poles 0.5 (chain of 3), -0.25 (chain of 2),
// 0.7 (chain of 2) and -0.6, input vector 1 on the last state of each chain.
package lti_pkg;

  localparam int W    = 16;  // data word length
  localparam int CW   = 16;  // constant word length
  localparam int FRAC = 14;  // fractional bits of a constant
  localparam int N    = 8;   // filter order (number of poles)

  typedef logic signed [CW-1:0] coef_t;
  typedef logic signed [W-1:0]  sample_t;

  // Modified Direct Form II, 2N states.
  localparam coef_t MDF2_CY = 16'sd8192;
  localparam coef_t MDF2_CS [2*N] = '{
    16'sd24576,  16'sd6554,  16'sd10772, -16'sd21012, -16'sd3092, -16'sd6380, -16'sd1905,
    16'sd5814,   16'sd333,   16'sd605,    16'sd87,    -16'sd278,  -16'sd6,    -16'sd34,
    16'sd0,      16'sd2};
  localparam coef_t MDF2_CX [2*N] = '{
    16'sd12288,  16'sd3277,  16'sd5386,  -16'sd10506, -16'sd1546, -16'sd3190, -16'sd953,
    16'sd2907,   16'sd166,   16'sd303,    16'sd44,    -16'sd139,  -16'sd3,    -16'sd17,
    16'sd0,      16'sd1};

  // Second companion form, N states.
  localparam coef_t COMP_CY = 16'sd8192;
  localparam coef_t COMP_CA [N] = '{
    16'sd6554, 16'sd10772, -16'sd3092, -16'sd1905, 16'sd333, 16'sd87, -16'sd6, 16'sd0};
  localparam coef_t COMP_CX [N] = '{
    16'sd12288, -16'sd5120, -16'sd4736, 16'sd1955, 16'sd469, -16'sd95, -16'sd20, 16'sd1};

  // Diagonal form, N states.
  localparam coef_t DIAG_D = 16'sd8192;
  localparam coef_t DIAG_LAMBDA [N] = '{
    16'sd12288, -16'sd9830, 16'sd8192, -16'sd6554, 16'sd4915, -16'sd3277, 16'sd1638, -16'sd819};
  localparam coef_t DIAG_C [N] = '{
    16'sd4096, 16'sd2048, -16'sd2048, 16'sd4096, 16'sd1024, -16'sd1024, 16'sd2048, 16'sd2048};

  // Jordan form, N states. JORD_SUPER[i] = 1 adds z_{i+1} into the update of z_i.
  localparam coef_t JORD_D = 16'sd8192;
  localparam coef_t JORD_LAMBDA [N] = '{
    16'sd8192, 16'sd8192, 16'sd8192, -16'sd4096, -16'sd4096, 16'sd11469, 16'sd11469, -16'sd9830};
  localparam logic [N-1:0] JORD_SUPER = 8'b0010_1011;
  localparam coef_t JORD_B [N] = '{
    16'sd0, 16'sd0, 16'sd16384, 16'sd0, 16'sd16384, 16'sd0, 16'sd16384, 16'sd16384};
  localparam coef_t JORD_C [N] = '{
    16'sd4096, 16'sd2048, 16'sd1024, -16'sd4096, 16'sd2048, 16'sd2048, -16'sd1024, 16'sd4096};

endpackage
