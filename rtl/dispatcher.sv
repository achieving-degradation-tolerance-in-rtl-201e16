// dispatcher: 2x2 router that sends each datum to an idle output.
//
// Two input channels and two output channels use bundled data with two-phase
// (transition) signalling: a channel has a request when req != ack, and an
// output channel is idle when its req == ack. Whenever an input has a request
// and an output is idle, the dispatcher copies the input's data into that
// output's register, toggles the output's req and toggles the input's ack.
// A busy (slow or degraded) unit downstream keeps its channel non-idle, so
// data flows to the other output instead and a slow unit receives less work.
//
// The structure follows the published dispatcher: request detection per input
// ("1 if requested"), idle detection per output ("1 if idle"), an input mutex
// and an output mutex choosing one of each, one multiplexer, one output
// register per output, a toggle flip-flop per input ack and a toggling
// flip-flop per output req. The self-timed local clock c_clk and its delay
// element become one clock cycle of `clk`: at most one transfer per cycle.
//
// Choices of this design: ties between inputs alternate; an input goes
// straight (in k to out k) when that output is idle, else across. In
// dispatcher-through mode (`through` = 1) input k only ever goes to output k,
// and both lanes may transfer in the same cycle.
//
// Timing: a transfer happens at the clock edge after in_req toggles while an
// output is idle; out_data/out_req and in_ack change on that edge.
module dispatcher #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          through,
  input  logic [DW-1:0] in_data [2],
  input  logic [1:0]    in_req,
  output logic [1:0]    in_ack,
  output logic [DW-1:0] out_data [2],
  output logic [1:0]    out_req,
  input  logic [1:0]    out_ack,
  output logic [1:0]    xfer,      // pulse: a datum was sent to output k
  output logic          crossed      // pulse: a datum was sent across (in k to out !k)
);

  logic [1:0] c, g;           // requested inputs, idle outputs
  logic [1:0] c_sel, g_sel;   // mutex grants
  logic       rr;             // input tie-break, alternates
  logic       src;            // selected input index
  logic       fire;           // one transfer in normal mode

  assign c = in_req ^ in_ack;
  assign g = ~(out_req ^ out_ack);

  me_arbiter u_in_me  (.r(c), .prefer(rr),  .g(c_sel));
  assign src = c_sel[1];
  me_arbiter u_out_me (.r(g), .prefer(src), .g(g_sel));

  assign fire = (|c_sel) && (|g_sel);

  always_comb begin
    xfer  = 2'b00;
    crossed = 1'b0;
    if (through) begin
      xfer = c & g;
    end else if (fire) begin
      xfer  = g_sel;
      crossed = (g_sel[1] != src);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_ack   <= 2'b00;
      out_req  <= 2'b00;
      out_data <= '{default: '0};
      rr       <= 1'b0;
    end else if (through) begin
      for (int k = 0; k < 2; k++) begin
        if (xfer[k]) begin
          out_data[k] <= in_data[k];
          out_req[k]  <= ~out_req[k];
          in_ack[k]   <= ~in_ack[k];
        end
      end
    end else if (fire) begin
      out_data[g_sel[1]] <= in_data[src];
      out_req[g_sel[1]]  <= ~out_req[g_sel[1]];
      in_ack[src]        <= ~in_ack[src];
      if (&c) rr <= ~src;
    end
  end

  // An output req may only toggle while that output was idle.
  for (genvar k = 0; k < 2; k++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     $changed(out_req[k]) |-> $past(g[k]));
  end

endmodule
