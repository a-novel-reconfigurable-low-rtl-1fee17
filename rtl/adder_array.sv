// adder_array: a column of independent two-input adders.
//
// Adder n adds operands a[n] and b[n] (signed, W bits) into a W+1-bit signed
// sum, so no result can overflow. In the reconfigurable DA datapath each
// adder forms one shared common term (a sum of inputs, or a sum of two
// earlier sums). Combinational; the pipeline registers sit in the top level.
module adder_array #(
  parameter int N = 12,
  parameter int W = 9
) (
  input  logic signed [W-1:0] a   [N],
  input  logic signed [W-1:0] b   [N],
  output logic signed [W:0]   sum [N]
);

  always_comb
    for (int n = 0; n < N; n++)
      sum[n] = {a[n][W-1], a[n]} + {b[n][W-1], b[n]};

endmodule
