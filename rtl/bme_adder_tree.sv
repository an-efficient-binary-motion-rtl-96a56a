// bme_adder_tree: counts the ones in a W-bit row with a binary tree of adders.
//
// Level 0 adds neighbouring bit pairs, each further level adds neighbouring
// partial sums of the level below, so a 16-bit row takes four adder levels
// and yields a 5-bit result. In the PE the input is either a candidate row
// (counting ones) or the XOR of a candidate row and a current-BAB row
// (partial SAD). Purely combinational; W must be a power of two.
module bme_adder_tree #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]         bits,
  output logic [$clog2(W):0]   sum
);
  localparam int unsigned LV = $clog2(W);
  localparam int unsigned SW = LV + 1;

  // node[l][i] is partial sum i of level l; level 0 holds the single bits.
  logic [SW-1:0] node [LV+1][W];

  always_comb begin
    for (int l = 0; l <= LV; l++)
      for (int i = 0; i < W; i++)
        node[l][i] = '0;
    for (int i = 0; i < W; i++)
      node[0][i] = SW'(bits[i]);
    for (int l = 1; l <= LV; l++)
      for (int i = 0; i < (W >> l); i++)
        node[l][i] = node[l-1][2*i] + node[l-1][2*i+1];
    sum = node[LV][0];
  end

endmodule
