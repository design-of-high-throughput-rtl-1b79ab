// companion2_filter: second companion form of a single-input single-output LTI system.
//
// The form is a chain of N delays between adders: every adder receives a constant times the
// input and a constant times the output, plus the next delay's content, and the last adder
// forms the output y = b0*x + z1. Feeding y back would make the loop two multipliers deep,
// so the feedback product a_j*y is expanded into a_j*b0*x + a_j*z1 and the two constants
// on x are merged:
//   y    = CY*x + z1                       (CY = b0)
//   zj'  = CXj*x + CAj*z1 + z(j+1)         (CXj = bj + aj*b0, CAj = aj)
//   zN'  = CXN*x + CAN*z1
// This gives latency m + a and sample period m + 2a. All feedback products are of z1 and
// all input products of x, so each goes through one shared-shift constant multiplier bank.
// The form and its timing follow the published method; the expansion of the feedback product, the
// number format, the valid strobe, the synchronous reset and the registered output are
// this design's choices.
// Interface: in_valid/x in; out_valid/y out, one sample per clock, y registered one cycle
// after x. States hold while in_valid is low; rst_n (active low, synchronous) clears them.
module companion2_filter #(
  parameter int W    = lti_pkg::W,
  parameter int CW   = lti_pkg::CW,
  parameter int FRAC = lti_pkg::FRAC,
  parameter int N    = lti_pkg::N,
  parameter logic signed [CW-1:0] CY = lti_pkg::COMP_CY,
  parameter logic signed [CW-1:0] CA [N] = lti_pkg::COMP_CA,
  parameter logic signed [CW-1:0] CX [N] = lti_pkg::COMP_CX
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);

  typedef logic signed [CW-1:0] xcoef_t [N+1];

  function automatic xcoef_t x_constants();
    xcoef_t r;
    for (int j = 0; j < N; j++) r[j] = CX[j];
    r[N] = CY;
    return r;
  endfunction

  localparam xcoef_t XC = x_constants();

  logic signed [W-1:0] z      [N];   // z[0] is z1
  logic signed [W-1:0] z_next [N];
  logic signed [W-1:0] pa     [N];
  logic signed [W-1:0] px     [N+1];

  shift_add_mcm #(.W(W), .CW(CW), .FRAC(FRAC), .K(N), .C(CA)) u_mul_z1 (
    .v(z[0]), .p(pa)
  );

  shift_add_mcm #(.W(W), .CW(CW), .FRAC(FRAC), .K(N + 1), .C(XC)) u_mul_x (
    .v(x), .p(px)
  );

  always_comb begin
    for (int j = 0; j < N - 1; j++) z_next[j] = (px[j] + pa[j]) + z[j+1];
    z_next[N-1] = px[N-1] + pa[N-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) z[j] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z <= z_next;
        y <= z[0] + px[N];
      end
    end
  end

endmodule
