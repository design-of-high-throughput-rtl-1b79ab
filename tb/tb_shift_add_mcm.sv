// tb_shift_add_mcm: checks the shared-shift constant multiplier against ordinary
// multiplication. Six constants cover positive, negative, the most negative value, zero
// and one; the variable runs over its extremes and random values. Each product must equal
// (C*v + 2^(FRAC-1)) >>> FRAC truncated to W bits.
module tb_shift_add_mcm;
  localparam int W = 16, CW = 16, FRAC = 14, K = 6;
  localparam logic signed [CW-1:0] C [K] =
    '{16'sd16384, -16'sd32768, 16'sd0, 16'sd12345, -16'sd7, 16'sd32767};

  logic signed [W-1:0] v;
  logic signed [W-1:0] p [K];
  int checks = 0, failures = 0;

  shift_add_mcm #(.W(W), .CW(CW), .FRAC(FRAC), .K(K), .C(C)) dut (.v(v), .p(p));

  function automatic logic signed [W-1:0] ref_mul(logic signed [CW-1:0] c, logic signed [W-1:0] a);
    longint prod;
    prod = longint'(c) * longint'(a) + (longint'(1) <<< (FRAC - 1));
    return W'(prod >>> FRAC);
  endfunction

  task automatic check_all();
    #1;
    for (int k = 0; k < K; k++) begin
      checks++;
      if (p[k] !== ref_mul(C[k], v)) begin
        failures++;
        $display("FAIL v=%0d C=%0d got %0d exp %0d", v, C[k], p[k], ref_mul(C[k], v));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = 16'sd0;        check_all();
    v = 16'sd1;        check_all();
    v = -16'sd1;       check_all();
    v = 16'sh7fff;     check_all();
    v = -16'sh8000;    check_all();
    for (int n = 0; n < 500; n++) begin
      v = W'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
