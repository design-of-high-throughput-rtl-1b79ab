// tb_companion2_filter: self-checking test of the modified Direct Form II structure.
//
// Random samples (with random gaps in in_valid, a reset in the middle of the run and a
// stretch of full-scale samples that make the datapath wrap) are sent to the filter. Two
// models run alongside:
//  - a bit-exact model of the state equations y = CY*x + z1, zj' = CXj*x + CAj*z1 + z(j+1),
//    zN' = CXN*x + CAN*z1, written with ordinary multiplication; every output must match it
//    exactly;
//  - a floating-point Direct Form II of the intended transfer function; outside the wrapping
//    stretch every output must be within TOL of it.
// Timing: out_valid must follow in_valid by exactly one clock (one sample per clock,
// one clock of latency).
module tb_companion2_filter;
  import lti_tb_pkg::*;

  localparam int NS  = N;
  localparam int TOL = 16; // LSBs allowed: constant quantisation plus product rounding

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] x = '0;
  logic out_valid;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;

  companion2_filter dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;

  logic signed [W-1:0] s [NS];
  logic signed [W-1:0] exp_y;
  logic exp_valid;
  real  exp_real;
  bit   exact_only;
  df2_ref ref_df2 = new();

  function automatic void model_step(logic signed [W-1:0] xi);
    logic signed [W-1:0] ns [NS];
    exp_y = s[0] + mulq(lti_pkg::COMP_CY, xi);
    for (int j = 0; j < NS; j++)
      ns[j] = mulq(lti_pkg::COMP_CX[j], xi) + mulq(lti_pkg::COMP_CA[j], s[0]) + ((j < NS - 1) ? s[j+1] : '0);
    s = ns;
  endfunction

  task automatic clear_models();
    foreach (s[k]) s[k] = '0;
    ref_df2.clear();
    exp_valid = 1'b0;
    exp_y = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int max_err = 0;
    clear_models();
    exact_only = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check what the previous edge produced
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("FAIL cycle %0d out_valid=%b exp %b", n, out_valid, exp_valid);
      end
      if (exp_valid) begin
        int err;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL cycle %0d y=%0d exp %0d", n, y, exp_y);
        end
        if (!exact_only) begin
          err = int'(y) - int'(exp_real);
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > TOL) begin
            failures++;
            $display("FAIL cycle %0d y=%0d real model %f", n, y, exp_real);
          end
        end
      end
      // reset in the middle of the run
      if (n == 1500) begin
        rst_n = 1'b0;
        in_valid = 1'b1;
        @(negedge clk);
        rst_n = 1'b1;
        clear_models();
        checks++;
        if (out_valid !== 1'b0 || y !== '0) begin
          failures++;
          $display("FAIL reset did not clear the output");
        end
      end
      // wrapping stretch: only the bit-exact model applies, then reset to resume
      if (n == 2500) exact_only = 1'b1;
      // new input
      in_valid = ($urandom_range(0, 9) < 8);
      if (n >= 2500 && n < 2600) x = W'($urandom);
      else x = W'($signed($urandom_range(0, 2048)) - 1024);
      if (n == 2600) begin
        in_valid = 1'b0;
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        clear_models();
        exact_only = 1'b0;
        // an impulse right after the reset
        in_valid = 1'b1;
        x = 16'sd1024;
      end
      exp_valid = in_valid;
      if (in_valid) begin
        model_step(x);
        exp_real = ref_df2.step(real'(x));
      end
    end
    $display("max |y - real Direct Form II| = %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
