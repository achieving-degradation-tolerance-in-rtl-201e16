// data_gen: data generator of one lane.
//
// On `start` it latches the row index i and then issues the K operand pairs
// of its lane for that row, one per two-phase handshake on its output
// channel: (coef[i][k], v_k) for k = 0 .. K-1, where v_k is x_j for the
// lane's global column j = LANE*K + k, except in the diagonal position j = i,
// where it is b_i. This is the Gauss-Seidel row written as one dot product:
// x_i = (1/a_ii) b_i + sum_{j != i} (-a_ij/a_ii) x_j, with the newest x_j
// already in memory.
//
// The first pair is issued on the second clock edge after `start` is seen;
// each further pair on the edge after the channel becomes idle again
// (out_req == out_ack); at most one pair per cycle. `busy` is high from
// `start` until the last pair has been issued.
module data_gen
  import gs_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter int unsigned K    = 8,
  parameter int unsigned LANE = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [$clog2(N)-1:0] row,
  output logic                 busy,
  // memory read port
  output logic [$clog2(N)-1:0] rd_row,
  output logic [$clog2(K)-1:0] rd_k,
  input  logic signed [W-1:0]  rd_coef,
  input  logic signed [W-1:0]  rd_x,
  input  logic signed [W-1:0]  rd_b,
  // operand channel
  output operand_t             out_data,
  output logic                 out_req,
  input  logic                 out_ack
);

  logic [$clog2(N)-1:0] row_q;
  logic [$clog2(K)-1:0] k_q;
  logic                 idle;
  logic                 diag;

  assign rd_row = row_q;
  assign rd_k   = k_q;
  assign idle   = (out_req == out_ack);
  assign diag   = (LANE * K + int'(k_q)) == int'(row_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_q    <= '0;
      k_q      <= '0;
      busy     <= 1'b0;
      out_req  <= 1'b0;
      out_data <= '0;
    end else if (start) begin
      row_q <= row;
      k_q   <= '0;
      busy  <= 1'b1;
    end else if (busy && idle) begin
      out_data.coef <= rd_coef;
      out_data.vec  <= diag ? rd_b : rd_x;
      out_req       <= ~out_req;
      k_q           <= k_q + 1'b1;
      if (int'(k_q) == K - 1) busy <= 1'b0;
    end
  end

endmodule
