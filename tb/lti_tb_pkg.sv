// lti_tb_pkg: reference arithmetic for the LTI filter testbenches.
//
// mulq() is the constant product of the datapath written with an ordinary multiplication:
// (c * v + 2^(FRAC-1)) shifted right arithmetically by FRAC and truncated to W bits.
// df2_ref is a floating-point Direct Form II model of the example transfer function
//   H(z) = (b0 + b1 z^-1 + ... + b8 z^-8) / (1 - a1 z^-1 - ... - a8 z^-8)
// with the exact (unquantised) coefficients of the example system described in lti_pkg:
//   w[t] = x[t] + sum_i a_i w[t-i],   y[t] = sum_i b_i w[t-i].
// It is the structure the other structures are transformed from, so it checks that their
// constants realise the intended transfer function, up to rounding.
package lti_tb_pkg;

  localparam int W    = lti_pkg::W;
  localparam int CW   = lti_pkg::CW;
  localparam int FRAC = lti_pkg::FRAC;
  localparam int N    = lti_pkg::N;

  function automatic logic signed [W-1:0] mulq(logic signed [CW-1:0] c, logic signed [W-1:0] v);
    longint prod;
    prod = longint'(c) * longint'(v) + (longint'(1) <<< (FRAC - 1));
    return W'(prod >>> FRAC);
  endfunction

  localparam real DF2_A [N] = '{0.4, 0.6575, -0.18875, -0.116275, 0.0202975, 0.005328,
                                -0.0003375, -2.7e-05};
  localparam real DF2_B [N+1] = '{0.5, 0.55, -0.64125, -0.1946875, 0.177434375, 0.018466875,
                                  -0.00848790625, -0.00104615625, 5.34375e-05};

  class df2_ref;
    real w [N+1];  // w[0] is the newest value
    function new();
      clear();
    endfunction
    function void clear();
      foreach (w[i]) w[i] = 0.0;
    endfunction
    function real step(real x);
      real acc, y;
      for (int i = N; i > 0; i--) w[i] = w[i-1];
      acc = x;
      for (int i = 1; i <= N; i++) acc += DF2_A[i-1] * w[i];
      w[0] = acc;
      y = 0.0;
      for (int i = 0; i <= N; i++) y += DF2_B[i] * w[i];
      return y;
    endfunction
  endclass

endpackage
