// lti_top: the four LTI filter structures side by side.
//
// The modified Direct Form II, the second companion form, the diagonal form and the Jordan
// form are alternative ways to build a linear time-invariant system with high throughput,
// low latency and low cost. They do not feed each other; each keeps its own sample stream
// ports. With the default constants the first three realise the same 8th-order transfer
// function (see lti_pkg) and give the same response up to rounding; the Jordan form
// realises an example system with repeated poles.
// Interface: per structure an input strobe and sample and an output strobe and sample; the
// clock and the synchronous active-low reset are shared. Every structure takes one sample
// per clock and registers its output one cycle after the input.
module lti_top #(
  parameter int W    = lti_pkg::W,
  parameter int CW   = lti_pkg::CW,
  parameter int FRAC = lti_pkg::FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                mdf2_in_valid,
  input  logic signed [W-1:0] mdf2_x,
  output logic                mdf2_out_valid,
  output logic signed [W-1:0] mdf2_y,
  input  logic                comp_in_valid,
  input  logic signed [W-1:0] comp_x,
  output logic                comp_out_valid,
  output logic signed [W-1:0] comp_y,
  input  logic                diag_in_valid,
  input  logic signed [W-1:0] diag_x,
  output logic                diag_out_valid,
  output logic signed [W-1:0] diag_y,
  input  logic                jord_in_valid,
  input  logic signed [W-1:0] jord_x,
  output logic                jord_out_valid,
  output logic signed [W-1:0] jord_y
);

  mdf2_filter #(.W(W), .CW(CW), .FRAC(FRAC)) u_mdf2 (
    .clk, .rst_n, .in_valid(mdf2_in_valid), .x(mdf2_x),
    .out_valid(mdf2_out_valid), .y(mdf2_y)
  );

  companion2_filter #(.W(W), .CW(CW), .FRAC(FRAC)) u_comp (
    .clk, .rst_n, .in_valid(comp_in_valid), .x(comp_x),
    .out_valid(comp_out_valid), .y(comp_y)
  );

  diag_filter #(.W(W), .CW(CW), .FRAC(FRAC)) u_diag (
    .clk, .rst_n, .in_valid(diag_in_valid), .x(diag_x),
    .out_valid(diag_out_valid), .y(diag_y)
  );

  jordan_filter #(.W(W), .CW(CW), .FRAC(FRAC)) u_jord (
    .clk, .rst_n, .in_valid(jord_in_valid), .x(jord_x),
    .out_valid(jord_out_valid), .y(jord_y)
  );

endmodule
