// ack_delay_inject: delay-fault injection on a functional unit's acknowledge.
//
// Models degradation of a functional unit by delaying the ack it returns to
// the dispatcher by 0 .. MAX_EL delay elements, selected at run time by `sel`.
// A delayed ack keeps the channel looking busy for longer, exactly as a
// slowed-down unit would. Each delay element is EL_CYCLES clock cycles; the
// length of an element is this design's choice (the fault-injection
// experiments count elements, 0, 1 and 2, but give no delay in time).
// With sel = 0 the ack passes through combinationally.
module ack_delay_inject #(
  parameter int unsigned MAX_EL    = 2,
  parameter int unsigned EL_CYCLES = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(MAX_EL+1)-1:0] sel,
  input  logic                        ack_in,
  output logic                        ack_out
);

  localparam int unsigned DEPTH = MAX_EL * EL_CYCLES;

  logic [DEPTH:0] taps;   // taps[d] = ack_in delayed by d cycles

  assign taps[0] = ack_in;

  always_ff @(posedge clk) begin
    if (!rst_n) taps[DEPTH:1] <= '0;
    else        taps[DEPTH:1] <= taps[DEPTH-1:0];
  end

  always_comb begin
    ack_out = taps[0];
    for (int e = 1; e <= MAX_EL; e++)
      if (int'(sel) == e) ack_out = taps[e * EL_CYCLES];
  end

endmodule
