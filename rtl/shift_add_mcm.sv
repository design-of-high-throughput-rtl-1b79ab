// shift_add_mcm: multiplies one variable by K constants with one shared set of shifts.
//
// The variable v is sign-extended and shifted by 0 .. CW-1 bit positions once; these CW
// shifted copies are shared by all K products. Product k is the sum of the copies whose bit
// is set in constant C[k], with the copy of the sign bit subtracted (two's complement
// weight -2^(CW-1)). Half an output LSB (2^(FRAC-1)) is added to the exact sum, which is
// then shifted right arithmetically by FRAC and truncated to W bits: round to nearest,
// ties towards plus infinity. So however many constants multiply the same variable, only CW shifts of it are
// needed, which is the bit-level view of constant multiplication the structures rely on.
// The simple shift-and-add form is this design's choice; a synthesis tool drops the
// copies that no constant selects.
//
// Interface: v (W-bit signed) in, p[K] (W-bit signed) out. Purely combinational: the
// depth is one multiplier delay m.
module shift_add_mcm #(
  parameter int W    = 16,
  parameter int CW   = 16,
  parameter int FRAC = 14,
  parameter int K    = 2,
  parameter logic signed [CW-1:0] C [K] = '{16'sd8192, -16'sd12288}
) (
  input  logic signed [W-1:0] v,
  output logic signed [W-1:0] p [K]
);

  localparam int AW = W + CW;  // exact product width

  logic signed [AW-1:0] sh [CW];

  always_comb begin
    for (int i = 0; i < CW; i++) sh[i] = AW'(v) <<< i;
  end

  for (genvar k = 0; k < K; k++) begin : g_prod
    logic signed [AW-1:0] acc;
    always_comb begin
      acc = (FRAC > 0) ? AW'(1) <<< (FRAC - 1) : '0;
      for (int i = 0; i < CW - 1; i++)
        if (C[k][i]) acc = acc + sh[i];
      if (C[k][CW-1]) acc = acc - sh[CW-1];
      p[k] = W'(acc >>> FRAC);
    end
  end

endmodule
