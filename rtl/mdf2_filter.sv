// mdf2_filter: modified Direct Form II structure for a single-input single-output LTI system.
//
// A Direct Form II filter of order N is rewritten (distributivity, constant propagation,
// retiming of the delays forward, common sub-expression replication) into 2N states
// s1 .. s2N whose updates all have the same shape:
//   y    = CY*x + s1
//   s1'  = s4 + s3 + CS1*s2 + CX1*x
//   s2'  = s3 + CS2*s2 + CX2*x
//   sk'  = s(k+2) + CSk*s2 + CXk*x        3 <= k <= 2N-2
//   sl'  =          CSl*s2 + CXl*x        l = 2N-1, 2N
// Odd states from s3 form the feedback column, even states from s4 the feed-forward column,
// s2 is the feedback column's top and s1 the merged output state. The output path is one
// multiplier and one adder deep (latency m + a); every state update is one multiplier and
// two adders deep (sample period m + 2a): the two products are formed in parallel, added,
// and the sum is added to the pair of state terms. All products are of only two variables,
// s2 and x, so each variable goes through one shared-shift constant multiplier bank.
//
// The state equations and their timing follow the published method; the number format, the valid
// strobe, the synchronous reset and the registered output are this design's choices.
// Interface: in_valid/x in; out_valid/y out. One sample per clock. y and out_valid are
// registered: the response to the x accepted in cycle t appears in cycle t+1. The states
// hold while in_valid is low; rst_n (active low, synchronous) clears them (zero initial state).
// N must be at least 2.
module mdf2_filter #(
  parameter int W    = lti_pkg::W,
  parameter int CW   = lti_pkg::CW,
  parameter int FRAC = lti_pkg::FRAC,
  parameter int N    = lti_pkg::N,
  parameter logic signed [CW-1:0] CY = lti_pkg::MDF2_CY,
  parameter logic signed [CW-1:0] CS [2*N] = lti_pkg::MDF2_CS,
  parameter logic signed [CW-1:0] CX [2*N] = lti_pkg::MDF2_CX
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);

  localparam int NS = 2 * N;  // number of states

  if (N < 2) begin : g_bad_order
    $error("mdf2_filter needs N >= 2");
  end

  typedef logic signed [CW-1:0] xcoef_t [NS+1];

  // Constants multiplying x: the 2N state constants followed by the output constant.
  function automatic xcoef_t x_constants();
    xcoef_t r;
    for (int k = 0; k < NS; k++) r[k] = CX[k];
    r[NS] = CY;
    return r;
  endfunction

  localparam xcoef_t XC = x_constants();

  logic signed [W-1:0] s      [NS];  // s[0] is s1
  logic signed [W-1:0] s_next [NS];
  logic signed [W-1:0] ps     [NS];   // CSk * s2
  logic signed [W-1:0] px     [NS+1]; // CXk * x, then CY * x
  logic signed [W-1:0] t      [NS];   // CSk * s2 + CXk * x

  shift_add_mcm #(.W(W), .CW(CW), .FRAC(FRAC), .K(NS), .C(CS)) u_mul_s2 (
    .v(s[1]), .p(ps)
  );

  shift_add_mcm #(.W(W), .CW(CW), .FRAC(FRAC), .K(NS + 1), .C(XC)) u_mul_x (
    .v(x), .p(px)
  );

  always_comb begin
    for (int k = 0; k < NS; k++) t[k] = ps[k] + px[k];
    s_next[0] = (s[3] + s[2]) + t[0];
    s_next[1] = s[2] + t[1];
    for (int k = 2; k < NS - 2; k++) s_next[k] = s[k+2] + t[k];
    s_next[NS-2] = t[NS-2];
    s_next[NS-1] = t[NS-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NS; k++) s[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        s <= s_next;
        y <= s[0] + px[NS];
      end
    end
  end

endmodule
