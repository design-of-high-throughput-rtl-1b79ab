// adder_tree: sums M signed W-bit terms in a balanced binary tree.
//
// The terms are padded with zeros to the next power of two and added pairwise, level by
// level, so the depth is ceil(log2 M) adder delays. This gives the output sum of the
// diagonal and Jordan forms the latency m + ceil(log2(R + 1)) for R delays and R + 1 terms.
// The sum wraps to W bits, like every adder of the datapath. Purely combinational.
module adder_tree #(
  parameter int W = 16,
  parameter int M = 9
) (
  input  logic signed [W-1:0] d [M],
  output logic signed [W-1:0] sum
);

  localparam int L = (M > 1) ? $clog2(M) : 0;  // number of adder levels
  localparam int P = 1 << L;                    // padded number of leaves

  logic signed [W-1:0] lvl [L+1][P];

  always_comb begin
    for (int l = 0; l <= L; l++)
      for (int i = 0; i < P; i++) lvl[l][i] = '0;
    for (int i = 0; i < M; i++) lvl[0][i] = d[i];
    for (int l = 0; l < L; l++)
      for (int i = 0; i < (P >> (l + 1)); i++)
        lvl[l+1][i] = lvl[l][2*i] + lvl[l][2*i+1];
  end

  assign sum = lvl[L][0];

endmodule
