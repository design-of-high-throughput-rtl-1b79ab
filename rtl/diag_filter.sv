// diag_filter: diagonal form of a single-input single-output LTI system.
//
// The state update matrix is diagonal, so the system falls apart into N first-order
// sections that run side by side. Section i adds the input to its own delayed state times
// its pole, z_i' = x + LAMBDA_i*z_i, one multiplier and one adder deep (sample period
// m + a). The output y = D*x + sum_i C_i*z_i adds R + 1 = N + 1 products in a balanced
// adder tree, so it is m + ceil(log2(R + 1)) adders deep. Each state is multiplied by two
// constants (its pole and its output weight) through one shared-shift multiplier bank.
// The form and its timing follow the published method; real poles, the number format, the valid
// strobe, the synchronous reset and the registered output are this design's choices.
// Interface: in_valid/x in; out_valid/y out, one sample per clock, y registered one cycle
// after x. States hold while in_valid is low; rst_n (active low, synchronous) clears them.
module diag_filter #(
  parameter int W    = lti_pkg::W,
  parameter int CW   = lti_pkg::CW,
  parameter int FRAC = lti_pkg::FRAC,
  parameter int N    = lti_pkg::N,
  parameter logic signed [CW-1:0] D = lti_pkg::DIAG_D,
  parameter logic signed [CW-1:0] LAMBDA [N] = lti_pkg::DIAG_LAMBDA,
  parameter logic signed [CW-1:0] C [N] = lti_pkg::DIAG_C
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] z      [N];
  logic signed [W-1:0] z_next [N];
  logic signed [W-1:0] terms  [N+1];  // C_i*z_i, then D*x
  logic signed [W-1:0] pd     [1];
  logic signed [W-1:0] y_next;

  for (genvar i = 0; i < N; i++) begin : g_sec
    localparam logic signed [CW-1:0] SC [2] = '{LAMBDA[i], C[i]};
    logic signed [W-1:0] pz [2];
    shift_add_mcm #(.W(W), .CW(CW), .FRAC(FRAC), .K(2), .C(SC)) u_mul (
      .v(z[i]), .p(pz)
    );
    assign z_next[i] = x + pz[0];
    assign terms[i]  = pz[1];
  end

  localparam logic signed [CW-1:0] DC [1] = '{D};
  shift_add_mcm #(.W(W), .CW(CW), .FRAC(FRAC), .K(1), .C(DC)) u_mul_x (
    .v(x), .p(pd)
  );
  assign terms[N] = pd[0];

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
