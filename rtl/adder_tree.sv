// adder_tree: sums the accumulators of the functional units.
//
// A balanced tree of two-input adders (two adders, then one, for four
// lanes, as in the original architecture) adds the LANES partial sums of the
// current row. The total (`sum`, internal) is in the product format
// (2*FRAC fraction bits); x_new is that total scaled back to a 16-bit
// variable: arithmetic shift right by FRAC, then saturation (this design's
// number format). The tree is combinational; the controller samples x_new
// once the row is complete.
module adder_tree
  import gs_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic signed [ACCW-1:0] acc [LANES],
  output logic signed [W-1:0]    x_new
);

  localparam int unsigned LEVELS = $clog2(LANES);

  logic signed [ACCW-1:0] sum;

  // node[l][n]: n-th adder output of level l; level 0 holds the inputs.
  logic signed [ACCW-1:0] node [LEVELS+1][LANES];

  always_comb begin
    node = '{default: '0};
    for (int n = 0; n < LANES; n++) node[0][n] = acc[n];
    for (int l = 1; l <= LEVELS; l++)
      for (int n = 0; n < (LANES >> l); n++)
        node[l][n] = node[l-1][2*n] + node[l-1][2*n+1];
  end

  assign sum   = node[LEVELS][0];
  assign x_new = acc_to_var(sum);

  initial assert (LANES == (1 << LEVELS)) else $error("LANES must be a power of two");

endmodule
