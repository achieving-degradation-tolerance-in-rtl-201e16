// gs_control: steps the solver through rows and iterations.
//
// One Gauss-Seidel iteration computes x_0 .. x_{N-1} in order, each from the
// newest values of the others. For row i the controller pulses row_start so
// that every data generator issues its K pairs of row i, then counts the
// products that the functional units report as accumulated (`fu_done`, one
// bit per unit, any number per cycle). When all N products of the row are in,
// the adder tree's result is final: the controller has it written back as
// x_i (wb_we and wb_row, one cycle; the data comes straight from the tree), clears the accumulators in the same cycle, and
// starts the next row. After `iters` full sweeps it raises `done`.
//
// The row barrier (counting products) is this design's choice: the
// dispatchers may deliver a row's products to any unit in any order, and the
// count tells when no product is still in flight.
//
// Timing per row: 1 cycle to start, the dataflow, then 1 cycle to see the
// final count and 1 write-back cycle.
module gs_control #(
  parameter int unsigned N     = 32,
  parameter int unsigned LANES = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [7:0]           iters,      // sweeps to run, at least 1
  input  logic [LANES-1:0]     fu_done,
  output logic                 busy,
  output logic                 done,       // high after the last sweep, until start
  output logic [$clog2(N)-1:0] row,
  output logic                 row_start,
  output logic                 acc_clr,
  output logic                 wb_we,
  output logic [$clog2(N)-1:0] wb_row,
  output logic [7:0]           iter
);

  typedef enum logic [1:0] {C_IDLE, C_ISSUE, C_WAIT, C_WB} cstate_e;

  cstate_e                state;
  logic [$clog2(N+1)-1:0] cnt;
  logic [$clog2(N+1)-1:0] cnt_next;

  always_comb begin
    cnt_next = cnt;
    for (int l = 0; l < LANES; l++) cnt_next = cnt_next + fu_done[l];
  end

  assign busy      = (state != C_IDLE);
  assign row_start = (state == C_ISSUE);
  assign wb_we     = (state == C_WB);
  assign acc_clr   = (state == C_WB);
  assign wb_row    = row;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= C_IDLE;
      cnt   <= '0;
      row   <= '0;
      iter  <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        C_IDLE: if (start) begin
          row   <= '0;
          iter  <= '0;
          done  <= 1'b0;
          state <= C_ISSUE;
        end
        C_ISSUE: begin
          cnt   <= cnt_next;
          state <= C_WAIT;
        end
        C_WAIT: begin
          cnt <= cnt_next;
          if (int'(cnt) == N) state <= C_WB;
        end
        C_WB: begin
          cnt <= '0;
          if (int'(row) == N - 1) begin
            row  <= '0;
            iter <= iter + 1'b1;
            if (iter + 1'b1 >= iters) begin
              done  <= 1'b1;
              state <= C_IDLE;
            end else begin
              state <= C_ISSUE;
            end
          end else begin
            row   <= row + 1'b1;
            state <= C_ISSUE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // No product may arrive once the row is complete.
  assert property (@(posedge clk) disable iff (!rst_n) int'(cnt) <= N);

endmodule
