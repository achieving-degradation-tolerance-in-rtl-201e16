// dispatch_network: two columns of 2x2 dispatchers between the four data
// generators and the four functional units.
//
// Column 1 pairs lanes (0,1) and (2,3); column 2 pairs them the same way.
// Between the columns lanes 1 and 2 are crossed, so that any data generator
// can reach any functional unit: column 1's upper dispatcher feeds lane 0 of
// column 2 from its output 0 and lane 2 from its output 1; column 1's lower
// dispatcher feeds lane 1 from its output 0 and lane 3 from its output 1.
// All channels are two-phase bundled data (see dispatcher). Latency is one
// clock per column when the path is idle.
//
// In dispatcher-through mode each dispatcher passes in k to out k, so data
// generator 1 then feeds functional unit 2 and generator 2 feeds unit 1; every
// unit still receives exactly one generator's stream.
module dispatch_network #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          through,
  input  logic [DW-1:0] in_data [4],
  input  logic [3:0]    in_req,
  output logic [3:0]    in_ack,
  output logic [DW-1:0] out_data [4],
  output logic [3:0]    out_req,
  input  logic [3:0]    out_ack,
  output logic [3:0]    crossed     // pulse per dispatcher: a datum went across
);

  // Per-dispatcher channel bundles: d = dispatcher 0..3 (column 1 upper,
  // column 1 lower, column 2 upper, column 2 lower), k = its port 0/1.
  logic [DW-1:0] d_in_data  [4][2];
  logic [DW-1:0] d_out_data [4][2];
  logic [1:0]    d_in_req [4], d_in_ack [4], d_out_req [4], d_out_ack [4];
  logic [1:0]    unused_xfer [4];

  for (genvar d = 0; d < 4; d++) begin : g_disp
    dispatcher #(.DW(DW)) u_disp (
      .clk, .rst_n, .through,
      .in_data (d_in_data[d]),  .in_req (d_in_req[d]),  .in_ack (d_in_ack[d]),
      .out_data(d_out_data[d]), .out_req(d_out_req[d]), .out_ack(d_out_ack[d]),
      .xfer(unused_xfer[d]), .crossed(crossed[d]));
  end

  always_comb begin
    // Column 1 takes the data generators: lanes (0,1) and (2,3).
    for (int l = 0; l < 4; l++) begin
      d_in_data[l/2][l%2] = in_data[l];
      d_in_req[l/2][l%2]  = in_req[l];
      in_ack[l]           = d_in_ack[l/2][l%2];
    end
    // Column 1 -> column 2 with lanes 1 and 2 crossed:
    //   upper.out0 -> c2 upper.in0   upper.out1 -> c2 lower.in0
    //   lower.out0 -> c2 upper.in1   lower.out1 -> c2 lower.in1
    for (int a = 0; a < 2; a++) begin      // column 1 dispatcher
      for (int k = 0; k < 2; k++) begin    // its output port
        d_in_data[2 + k][a] = d_out_data[a][k];
        d_in_req[2 + k][a]  = d_out_req[a][k];
        d_out_ack[a][k]     = d_in_ack[2 + k][a];
      end
    end
    // Column 2 drives the functional units.
    for (int l = 0; l < 4; l++) begin
      out_data[l]            = d_out_data[2 + l/2][l%2];
      out_req[l]             = d_out_req[2 + l/2][l%2];
      d_out_ack[2 + l/2][l%2] = out_ack[l];
    end
  end

endmodule
