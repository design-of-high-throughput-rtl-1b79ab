// tb_lti_top: end-to-end test of the four LTI structures at their default sizes.
//
// The modified Direct Form II, the second companion form and the diagonal form get the same
// sample stream with the same in_valid gaps. With the default constants they realise the
// same transfer function, so at every output each is compared with a floating-point Direct
// Form II of that function and with the other two (within TOL). The Jordan form gets its own
// stream with its own gaps and is compared with a floating-point state-space model of its
// example system. An impulse, a step and random samples are sent, with a reset in between.
// Timing: out_valid of each structure must follow its in_valid by exactly one clock.
// Counted events, each of which must happen at least once: an input gap (states held), a
// reset in the middle of a stream, an output of each structure checked against its model.
module tb_lti_top;
  import lti_tb_pkg::*;

  localparam int TOL = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, jord_in_valid = 1'b0;
  logic signed [W-1:0] x = '0, jord_x = '0;
  logic mdf2_out_valid, comp_out_valid, diag_out_valid, jord_out_valid;
  logic signed [W-1:0] mdf2_y, comp_y, diag_y, jord_y;
  int checks = 0, failures = 0;
  int n_gap = 0, n_jgap = 0, n_reset = 0, n_mdf2 = 0, n_comp = 0, n_diag = 0, n_jord = 0;

  lti_top dut (
    .clk, .rst_n,
    .mdf2_in_valid(in_valid), .mdf2_x(x), .mdf2_out_valid, .mdf2_y,
    .comp_in_valid(in_valid), .comp_x(x), .comp_out_valid, .comp_y,
    .diag_in_valid(in_valid), .diag_x(x), .diag_out_valid, .diag_y,
    .jord_in_valid, .jord_x, .jord_out_valid, .jord_y
  );

  always #5 clk = ~clk;

  df2_ref ref_df2 = new();
  real exp_h, exp_j;
  logic exp_valid = 1'b0, exp_jvalid = 1'b0;

  // Jordan example system, exact values
  real zr [N];
  localparam real LR [N] = '{0.5, 0.5, 0.5, -0.25, -0.25, 0.7, 0.7, -0.6};
  localparam real BR [N] = '{0.0, 0.0, 1.0, 0.0, 1.0, 0.0, 1.0, 1.0};
  localparam real CR [N] = '{0.25, 0.125, 0.0625, -0.25, 0.125, 0.125, -0.0625, 0.25};
  localparam real SR [N] = '{1.0, 1.0, 0.0, 1.0, 0.0, 1.0, 0.0, 0.0};

  function automatic real jord_step(real xi);
    real yr, nz [N];
    yr = 0.5 * xi;
    for (int i = 0; i < N; i++) yr += CR[i] * zr[i];
    for (int i = 0; i < N; i++) nz[i] = LR[i] * zr[i] + BR[i] * xi + ((i < N - 1) ? SR[i] * zr[i+1] : 0.0);
    zr = nz;
    return yr;
  endfunction

  task automatic close_to(logic signed [W-1:0] got, real expv, int tol, string what);
    int err;
    err = int'(got) - int'(expv);
    if (err < 0) err = -err;
    checks++;
    if (err > tol) begin
      failures++;
      $display("FAIL %s: %0d, expected about %f", what, got, expv);
    end
  endtask

  task automatic check_outputs();
    checks += 4;
    if (mdf2_out_valid !== exp_valid || comp_out_valid !== exp_valid ||
        diag_out_valid !== exp_valid) begin
      failures++;
      $display("FAIL out_valid %b%b%b expected %b", mdf2_out_valid, comp_out_valid, diag_out_valid, exp_valid);
    end
    if (jord_out_valid !== exp_jvalid) begin
      failures++;
      $display("FAIL jord out_valid %b expected %b", jord_out_valid, exp_jvalid);
    end
    if (exp_valid) begin
      close_to(mdf2_y, exp_h, TOL, "modified Direct Form II");
      close_to(comp_y, exp_h, TOL, "second companion form");
      close_to(diag_y, exp_h, TOL, "diagonal form");
      close_to(mdf2_y, real'(comp_y), 2 * TOL, "modified DF II vs companion");
      close_to(mdf2_y, real'(diag_y), 2 * TOL, "modified DF II vs diagonal");
      n_mdf2++; n_comp++; n_diag++;
    end
    if (exp_jvalid) begin
      close_to(jord_y, exp_j, TOL, "Jordan form");
      n_jord++;
    end
  endtask

  task automatic apply(logic v, logic signed [W-1:0] xv, logic jv, logic signed [W-1:0] jx);
    @(negedge clk);
    check_outputs();
    in_valid = v; x = xv; jord_in_valid = jv; jord_x = jx;
    if (!v) n_gap++;
    if (!jv) n_jgap++;
    exp_valid = v; exp_jvalid = jv;
    if (v) exp_h = ref_df2.step(real'(xv));
    if (jv) exp_j = jord_step(real'(jx));
  endtask

  task automatic do_reset();
    @(negedge clk);
    check_outputs();
    rst_n = 1'b0; in_valid = 1'b0; jord_in_valid = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    ref_df2.clear();
    foreach (zr[i]) zr[i] = 0.0;
    exp_valid = 1'b0; exp_jvalid = 1'b0;
    n_reset++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (zr[i]) zr[i] = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // impulse response
    apply(1'b1, 16'sd4096, 1'b1, 16'sd2048);
    for (int n = 0; n < 40; n++) apply(1'b1, '0, 1'b1, '0);
    // step response with gaps
    for (int n = 0; n < 200; n++)
      apply(n % 7 != 3, 16'sd1000, n % 5 != 1, 16'sd500);
    // random samples with random gaps, a reset in the middle
    for (int n = 0; n < 4000; n++) begin
      if (n == 2000) do_reset();
      apply($urandom_range(0, 9) < 8, W'($signed($urandom_range(0, 4000)) - 2000),
            $urandom_range(0, 9) < 7, W'($signed($urandom_range(0, 2000)) - 1000));
    end
    apply(1'b0, '0, 1'b0, '0);
    @(negedge clk);
    check_outputs();
    $display("input gaps %0d / %0d, resets %0d, outputs checked: mdf2 %0d comp %0d diag %0d jordan %0d",
             n_gap, n_jgap, n_reset, n_mdf2, n_comp, n_diag, n_jord);
    checks += 7;
    if (n_gap == 0)   begin failures++; $display("FAIL no input gap"); end
    if (n_jgap == 0)  begin failures++; $display("FAIL no Jordan input gap"); end
    if (n_reset == 0) begin failures++; $display("FAIL no reset"); end
    if (n_mdf2 == 0)  begin failures++; $display("FAIL no modified DF II output"); end
    if (n_comp == 0)  begin failures++; $display("FAIL no companion output"); end
    if (n_diag == 0)  begin failures++; $display("FAIL no diagonal output"); end
    if (n_jord == 0)  begin failures++; $display("FAIL no Jordan output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
