// me_arbiter: mutual-exclusion element of the dispatcher (input ME and
// output ME).
//
// Two request lines come in; at most one grant goes out. In the self-timed
// dispatcher this is an analog mutex that resolves whichever request arrived
// first. In this clocked model both requests are sampled in the same cycle,
// so a tie is broken by the `prefer` input (0 or 1), which the dispatcher
// drives. The element is combinational: grants follow requests within the
// cycle. The tie-break rule is this design's choice.
//
//   r[1:0]  request lines
//   prefer  which request wins when both are high
//   g[1:0]  grants, one-hot or zero
module me_arbiter (
  input  logic [1:0] r,
  input  logic       prefer,
  output logic [1:0] g
);

  always_comb begin
    g = 2'b00;
    if (r[0] && r[1]) g[prefer] = 1'b1;
    else              g = r;
  end

  always_comb assert ($countones(g) <= 1);

endmodule
