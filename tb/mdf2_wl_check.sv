// mdf2_wl_check: drives one modified Direct Form II instance of a given word length W and
// order N with random samples and gaps and checks it.
//
// Each output must equal a bit-exact model of the structure's state equations (written
// with ordinary multiplication, generic in W) and must lie within TOL LSBs of a
// floating-point Direct Form II with the exact coefficients DA, DB. out_valid must follow
// in_valid by one clock. The run starts when start rises and done rises when it ends;
// checks and failures are counted in the ports.
module mdf2_wl_check #(
  parameter int W    = 8,
  parameter int N    = 3,
  parameter int CW   = 16,
  parameter int FRAC = 14,
  parameter int AMP  = 40,      // input amplitude
  parameter int TOL  = 2,
  parameter int SAMPLES = 2000,
  parameter logic signed [CW-1:0] CY = 16'sd8192,
  parameter logic signed [CW-1:0] CS [2*N] = '{16'sd12288, 16'sd8192, 16'sd1966, -16'sd6472, -16'sd590, 16'sd1819},
  parameter logic signed [CW-1:0] CX [2*N] = '{16'sd6144, 16'sd4096, 16'sd983, -16'sd3236, -16'sd295, 16'sd909},
  parameter real DA [N]   = '{0.5, 0.12, -0.036},
  parameter real DB [N+1] = '{0.5, 0.125, -0.1975, 0.0555}
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int NS = 2 * N;

  logic rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] x = '0;
  logic out_valid;
  logic signed [W-1:0] y;

  mdf2_filter #(.W(W), .CW(CW), .FRAC(FRAC), .N(N), .CY(CY), .CS(CS), .CX(CX)) dut (
    .clk, .rst_n, .in_valid, .x, .out_valid, .y
  );

  function automatic logic signed [W-1:0] mulq(logic signed [CW-1:0] c, logic signed [W-1:0] v);
    longint prod;
    prod = longint'(c) * longint'(v) + (longint'(1) <<< (FRAC - 1));
    return W'(prod >>> FRAC);
  endfunction

  logic signed [W-1:0] s [NS];
  logic signed [W-1:0] exp_y = '0;
  logic exp_valid = 1'b0;
  real  wr [N+1];
  real  exp_real = 0.0;

  function automatic void model_step(logic signed [W-1:0] xi);
    logic signed [W-1:0] t  [NS];
    logic signed [W-1:0] ns [NS];
    real acc;
    exp_y = s[0] + mulq(CY, xi);
    for (int k = 0; k < NS; k++) t[k] = mulq(CS[k], s[1]) + mulq(CX[k], xi);
    ns[0] = s[3] + s[2] + t[0];
    ns[1] = s[2] + t[1];
    for (int k = 2; k <= NS - 3; k++) ns[k] = s[k+2] + t[k];
    ns[NS-2] = t[NS-2];
    ns[NS-1] = t[NS-1];
    s = ns;
    for (int i = N; i > 0; i--) wr[i] = wr[i-1];
    acc = real'(xi);
    for (int i = 1; i <= N; i++) acc += DA[i-1] * wr[i];
    wr[0] = acc;
    exp_real = 0.0;
    for (int i = 0; i <= N; i++) exp_real += DB[i] * wr[i];
  endfunction

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    foreach (s[k]) s[k] = '0;
    foreach (wr[i]) wr[i] = 0.0;
    wait (start);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < SAMPLES; n++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== exp_valid) failures++;
      if (exp_valid) begin
        int err;
        checks += 2;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL W=%0d N=%0d y=%0d exp %0d", W, N, y, exp_y);
        end
        err = int'(y) - int'(exp_real);
        if (err < 0) err = -err;
        if (err > TOL) begin
          failures++;
          $display("FAIL W=%0d N=%0d y=%0d real model %f", W, N, y, exp_real);
        end
      end
      in_valid = ($urandom_range(0, 9) < 8);
      x = W'($signed($urandom_range(0, 2 * AMP)) - AMP);
      exp_valid = in_valid;
      if (in_valid) model_step(x);
    end
    done = 1'b1;
  end

endmodule
