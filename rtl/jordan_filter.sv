// jordan_filter: Jordan form of a single-input single-output LTI system.
//
// The state update matrix has the poles on its diagonal and ones on some places of the
// super-diagonal, one chain of ones per repeated pole. State i is updated as
//   z_i' = LAMBDA_i*z_i + B_i*x + (SUPER[i] ? z_(i+1) : 0)
// which is one multiplier and two adders deep (sample period m + 2a). The output
// y = D*x + sum_i C_i*z_i is summed in a balanced adder tree as in the diagonal form. Each
// state is multiplied by its pole and its output weight through one shared-shift bank; all
// input products share one bank on x. The form and its sample period follow the published method;
// the input vector B, the number format, the valid strobe, the synchronous reset and the
// registered output are this design's choices. SUPER[N-1] is unused.
// Interface: in_valid/x in; out_valid/y out, one sample per clock, y registered one cycle
// after x. States hold while in_valid is low; rst_n (active low, synchronous) clears them.
module jordan_filter #(
  parameter int W    = lti_pkg::W,
  parameter int CW   = lti_pkg::CW,
  parameter int FRAC = lti_pkg::FRAC,
  parameter int N    = lti_pkg::N,
  parameter logic signed [CW-1:0] D = lti_pkg::JORD_D,
  parameter logic signed [CW-1:0] LAMBDA [N] = lti_pkg::JORD_LAMBDA,
  parameter logic [N-1:0] SUPER = lti_pkg::JORD_SUPER,
  parameter logic signed [CW-1:0] B [N] = lti_pkg::JORD_B,
  parameter logic signed [CW-1:0] C [N] = lti_pkg::JORD_C
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
    for (int i = 0; i < N; i++) r[i] = B[i];
    r[N] = D;
    return r;
  endfunction

  localparam xcoef_t XC = x_constants();

  logic signed [W-1:0] z      [N];
  logic signed [W-1:0] z_next [N];
  logic signed [W-1:0] px     [N+1];  // B_i*x, then D*x
  logic signed [W-1:0] terms  [N+1];  // C_i*z_i, then D*x
  logic signed [W-1:0] y_next;

  shift_add_mcm #(.W(W), .CW(CW), .FRAC(FRAC), .K(N + 1), .C(XC)) u_mul_x (
    .v(x), .p(px)
  );

  for (genvar i = 0; i < N; i++) begin : g_sec
    localparam logic signed [CW-1:0] SC [2] = '{LAMBDA[i], C[i]};
    logic signed [W-1:0] pz [2];
    logic signed [W-1:0] up;
    shift_add_mcm #(.W(W), .CW(CW), .FRAC(FRAC), .K(2), .C(SC)) u_mul (
      .v(z[i]), .p(pz)
    );
    if (i < N - 1) begin : g_chain
      assign up = SUPER[i] ? z[i+1] : '0;
    end else begin : g_last
      assign up = '0;
    end
    assign z_next[i] = (pz[0] + px[i]) + up;
    assign terms[i]  = pz[1];
  end
  assign terms[N] = px[N];

  adder_tree #(.W(W), .M(N + 1)) u_sum (.d(terms), .sum(y_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) z[i] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z <= z_next;
        y <= y_next;
      end
    end
  end

endmodule
