// gs_solver_top: degradation-tolerant Gauss-Seidel linear equation solver.
//
// Solves A x = b for N unknowns by Gauss-Seidel sweeps. Row i of a sweep is
// one dot product, x_i = sum_j c_ij v_j, with c_ij = -a_ij/a_ii (j != i),
// c_ii = 1/a_ii, v_j the newest x_j and v_i = b_i. The coefficients c_ij are
// loaded pre-divided by the host.
//
// Four lanes each hold a block of N/4 columns (lane_mem) and a data generator
// (data_gen) that streams the lane's (c_ij, v_j) pairs of the current row.
// The pairs pass through two columns of 2x2 dispatchers (dispatch_network)
// to four multiply-accumulate units (mac_fu). Every channel is a two-phase
// request/acknowledge handshake, and a unit acknowledges only when its
// dual-rail result is complete, so a dispatcher sends each pair to whichever
// unit is idle: a slow unit simply receives fewer pairs. An adder tree sums
// the four accumulators into x_i, which is written back to the lane holding
// column i before the next row starts (gs_control).
//
// For evaluation, each unit's acknowledge can be delayed by 0, 1 or 2 delay
// elements (ack_delay_inject, `ack_dly_sel`), and `through` puts every
// dispatcher into through mode (no redistribution). Both are inputs of the
// tested chip's experiments. The asynchronous circuits are modelled as
// synchronous logic on one clock; see the individual modules.
//
// Host port: host_we writes host_wdata as a coefficient (row host_row,
// column host_col), an initial x_{host_col} or b_{host_col}; host_raddr
// reads x. `sweep` counts finished sweeps and `crossed` shows each
// redistribution by a dispatcher; `dr_error` reports a unit whose dual-rail
// register held a non-code word. Load only while busy is low. start runs `iters` sweeps; done rises
// when they are finished.
module gs_solver_top
  import gs_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned MAX_EL    = 2,
  parameter int unsigned EL_CYCLES = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host interface
  input  logic                        host_we,
  input  host_kind_e                  host_kind,
  input  logic [$clog2(N)-1:0]        host_row,
  input  logic [$clog2(N)-1:0]        host_col,
  input  logic signed [W-1:0]         host_wdata,
  input  logic [$clog2(N)-1:0]        host_raddr,
  output logic signed [W-1:0]         host_rdata,
  // run control
  input  logic                        start,
  input  logic [7:0]                  iters,
  output logic                        busy,
  output logic                        done,
  // evaluation controls
  input  logic                        through,
  input  logic [$clog2(MAX_EL+1)-1:0] ack_dly_sel [4],
  // observation
  output logic [7:0]                  sweep,     // sweeps completed
  output logic [3:0]                  crossed,   // per dispatcher: pulse when a pair is redirected
  output logic [3:0]                  dr_error   // per unit: dual-rail non-code seen (stuck-at fault)
);

  localparam int unsigned LANES = 4;
  localparam int unsigned K     = N / LANES;
  localparam int unsigned KB    = $clog2(K);
  localparam int unsigned DW    = $bits(operand_t);

  // Controller
  logic [$clog2(N)-1:0] row, wb_row;
  logic                 row_start, acc_clr, wb_we;
  logic signed [W-1:0]  x_new;
  logic [LANES-1:0]     fu_done;

  // Lanes
  logic [$clog2(N)-1:0] rd_row  [LANES];
  logic [KB-1:0]        rd_k    [LANES];
  logic signed [W-1:0]  rd_coef [LANES], rd_x [LANES], rd_b [LANES], hr_x [LANES];
  logic [LANES-1:0]     dg_busy;

  // Dispatch network channels
  logic [DW-1:0]        gen_data [LANES], fu_data [LANES];
  operand_t             gen_op   [LANES];
  logic [LANES-1:0]     gen_req, gen_ack, fu_req, fu_ack, fu_ack_dly;

  logic signed [ACCW-1:0] acc [LANES];

  gs_control #(.N(N), .LANES(LANES)) u_ctrl (
    .clk, .rst_n, .start, .iters, .fu_done, .busy, .done,
    .row, .row_start, .acc_clr, .wb_we, .wb_row, .iter(sweep));

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    lane_mem #(.N(N), .K(K)) u_mem (
      .clk,
      .host_we   (host_we && (int'(host_col) / K == l)),
      .host_kind, .host_row,
      .host_k    (KB'(int'(host_col) % K)),
      .host_wdata,
      .hr_k      (KB'(int'(host_raddr) % K)),
      .hr_x      (hr_x[l]),
      .wb_we     (wb_we && (int'(wb_row) / K == l)),
      .wb_k      (KB'(int'(wb_row) % K)),
      .wb_data   (x_new),
      .rd_row    (rd_row[l]), .rd_k(rd_k[l]),
      .rd_coef   (rd_coef[l]), .rd_x(rd_x[l]), .rd_b(rd_b[l]));

    data_gen #(.N(N), .K(K), .LANE(l)) u_gen (
      .clk, .rst_n, .start(row_start), .row, .busy(dg_busy[l]),
      .rd_row(rd_row[l]), .rd_k(rd_k[l]),
      .rd_coef(rd_coef[l]), .rd_x(rd_x[l]), .rd_b(rd_b[l]),
      .out_data(gen_op[l]), .out_req(gen_req[l]), .out_ack(gen_ack[l]));

    assign gen_data[l] = gen_op[l];

    mac_fu u_fu (
      .clk, .rst_n,
      .in_data(operand_t'(fu_data[l])), .in_req(fu_req[l]), .in_ack(fu_ack[l]),
      .acc_clr, .acc(acc[l]), .done(fu_done[l]), .code_err(dr_error[l]));

    ack_delay_inject #(.MAX_EL(MAX_EL), .EL_CYCLES(EL_CYCLES)) u_dly (
      .clk, .rst_n, .sel(ack_dly_sel[l]), .ack_in(fu_ack[l]), .ack_out(fu_ack_dly[l]));
  end

  dispatch_network #(.DW(DW)) u_net (
    .clk, .rst_n, .through,
    .in_data(gen_data), .in_req(gen_req), .in_ack(gen_ack),
    .out_data(fu_data), .out_req(fu_req), .out_ack(fu_ack_dly),
    .crossed);

  adder_tree #(.LANES(LANES)) u_tree (.acc, .x_new);

  assign host_rdata = hr_x[int'(host_raddr) / K];

  // A row is written back only after every generator has issued its pairs.
  assert property (@(posedge clk) disable iff (!rst_n) wb_we |-> dg_busy == '0);

  initial assert (N % LANES == 0 && K == (1 << KB)) else $error("N/4 must be a power of two");

endmodule
