// lane_mem: the memory stack of one lane (MEM).
//
// The coefficient matrix of the Gauss-Seidel step is split by columns: lane L
// holds columns L*K .. L*K+K-1 of every row (K = N / LANES), together with the
// matching entries of the solution vector x and of the right-hand side b.
// Three arrays: coef[row][k], x[k] and b[k]. Coefficients are stored already
// divided by the diagonal: -a_ij/a_ii off the diagonal and 1/a_ii on it.
//
// The split by columns and the three kinds of contents follow the original
// architecture; the array organisation and the ports are this design's.
//
// Writes come from the host port (loading a problem) and from the
// write-back port (a new x_i computed by the solver); a write-back wins if
// both hit x in the same cycle. Reads are combinational: the data generator
// reads (rd_row, rd_k); the host reads x through hr_k.
module lane_mem
  import gs_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 8
) (
  input  logic                  clk,
  // host port
  input  logic                  host_we,
  input  host_kind_e            host_kind,
  input  logic [$clog2(N)-1:0]  host_row,
  input  logic [$clog2(K)-1:0]  host_k,
  input  logic signed [W-1:0]   host_wdata,
  input  logic [$clog2(K)-1:0]  hr_k,
  output logic signed [W-1:0]   hr_x,
  // write-back of a new x entry
  input  logic                  wb_we,
  input  logic [$clog2(K)-1:0]  wb_k,
  input  logic signed [W-1:0]   wb_data,
  // data generator read port
  input  logic [$clog2(N)-1:0]  rd_row,
  input  logic [$clog2(K)-1:0]  rd_k,
  output logic signed [W-1:0]   rd_coef,
  output logic signed [W-1:0]   rd_x,
  output logic signed [W-1:0]   rd_b
);

  logic signed [W-1:0] coef [N][K];
  logic signed [W-1:0] x    [K];
  logic signed [W-1:0] b    [K];

  always_ff @(posedge clk) begin
    if (host_we) begin
      unique case (host_kind)
        HOST_COEF: coef[host_row][host_k] <= host_wdata;
        HOST_X:    x[host_k]              <= host_wdata;
        HOST_B:    b[host_k]              <= host_wdata;
        default: ;
      endcase
    end
    if (wb_we) x[wb_k] <= wb_data;
  end

  assign rd_coef = coef[rd_row][rd_k];
  assign rd_x    = x[rd_k];
  assign rd_b    = b[rd_k];
  assign hr_x    = x[hr_k];

endmodule
