// tb_adder_tree: checks the balanced adder tree for 9 terms (the default) and for 5 and 1
// terms against a plain running sum wrapped to W bits, on random and extreme terms.
module tb_adder_tree;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic signed [W-1:0] d9 [9];
  logic signed [W-1:0] d5 [5];
  logic signed [W-1:0] d1 [1];
  logic signed [W-1:0] s9, s5, s1;

  adder_tree #(.W(W), .M(9)) dut9 (.d(d9), .sum(s9));
  adder_tree #(.W(W), .M(5)) dut5 (.d(d5), .sum(s5));
  adder_tree #(.W(W), .M(1)) dut1 (.d(d1), .sum(s1));

  task automatic check(logic signed [W-1:0] got, int exp, string what);
    checks++;
    if (got !== W'(exp)) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, W'(exp));
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
    for (int n = 0; n < 400; n++) begin
      int e9, e5;
      e9 = 0; e5 = 0;
      for (int i = 0; i < 9; i++) begin
        d9[i] = (n < 4) ? ((n % 2) ? -16'sh8000 : 16'sh7fff) : W'($urandom);
        e9 += int'(d9[i]);
      end
      for (int i = 0; i < 5; i++) begin
        d5[i] = W'($urandom);
        e5 += int'(d5[i]);
      end
      d1[0] = W'($urandom);
      #1;
      check(s9, e9, "M=9");
      check(s5, e5, "M=5");
      check(s1, int'(d1[0]), "M=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
