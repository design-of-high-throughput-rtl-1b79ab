// tb_mdf2_wordlength: the modified Direct Form II at the word lengths and orders of the
// benchmark controllers: an 8-bit 3rd-order system (the size of the 3-state controller) and
// a 32-bit 5th-order system (the size of the 5-state controllers). The constants are those
// of example systems with real poles, {0.6, -0.3, 0.2} and {0.7, -0.5, 0.4, -0.2, 0.1}
// (the benchmarks' own constants are not available). Each instance is checked bit-exactly
// against a model of the state equations and against a floating-point Direct Form II.
// The constants are quantised to 2^-14, so the tolerance against the floating-point model
// grows with the amplitude: 8 LSB at 8 bits, 256 LSB (about AMP/4000) at 32 bits.
module tb_mdf2_wordlength;
  logic clk = 1'b0;
  logic start = 1'b0;
  logic done8, done32;
  int   c8, f8, c32, f32;

  always #5 clk = ~clk;

  mdf2_wl_check #(.W(8), .N(3), .AMP(40), .TOL(8)) u_w8 (
    .clk, .start, .done(done8), .checks(c8), .failures(f8)
  );

  // 5th-order example system, constants round(value * 2^14) as in lti_pkg
  localparam logic signed [15:0] CS5 [10] = '{16'sd10240, 16'sd8192, 16'sd5734, -16'sd3686,
    -16'sd2048, -16'sd2683, -16'sd318, 16'sd277, 16'sd46, -16'sd64};
  localparam logic signed [15:0] CX5 [10] = '{16'sd5120, 16'sd4096, 16'sd2867, -16'sd1843,
    -16'sd1024, -16'sd1341, -16'sd159, 16'sd138, 16'sd23, -16'sd32};
  localparam real DA5 [5] = '{0.5, 0.35, -0.125, -0.0194, 0.0028};
  localparam real DB5 [6] = '{0.5, 0.0625, -0.1125, -0.081875, 0.00845, -0.00195};

  mdf2_wl_check #(
    .W(32), .N(5), .AMP(1000000), .TOL(256), .CY(16'sd8192),
    .CS(CS5), .CX(CX5), .DA(DA5), .DB(DB5)
  ) u_w32 (
    .clk, .start, .done(done32), .checks(c32), .failures(f32)
  );

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c32, f8 + f32 + 1);
    $finish;
  end

  initial begin
    @(negedge clk);
    start = 1'b1;
    wait (done8 && done32);
    $display("8-bit: %0d checks %0d failures; 32-bit: %0d checks %0d failures", c8, f8, c32, f32);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c32, f8 + f32);
    $finish;
  end
endmodule
