// tb_gs_solver_top: end-to-end test of the solver at its default size
// (32 unknowns, 16-bit variables, four lanes).
//
// A random diagonally dominant system with a known integer solution is
// loaded through the host port. The solver then runs three sweeps in six
// configurations - normal and dispatcher-through mode, each with 0, 1 and 2
// delay elements on the acknowledges of functional units 0 and 1 - and the
// result of every configuration is compared bit for bit with a fixed-point
// reference model computed here. A final long run checks that the sweeps
// converge to the known solution. The cycle count of every configuration is
// printed as a ratio to normal mode without delay, and the test checks that
// with injected delays normal mode is faster than through mode. It counts
// redistributions, input ties, delayed acknowledges, write-backs and through
// mode transfers, and fails if any of them never happened. Last, a false
// rail of unit 3's dual-rail register is forced high while it holds a valid
// word (a stuck-at-1 fault): the unit must flag the non-code word, stop
// acknowledging, and the solver must not report a result.
`timescale 1ns/1ps
module tb_gs_solver_top;
  import gs_pkg::*;

  localparam int N = 32;

  logic clk = 0, rst_n = 0;
  logic host_we = 0;
  host_kind_e host_kind = HOST_COEF;
  logic [4:0] host_row = 0, host_col = 0, host_raddr = 0;
  logic signed [W-1:0] host_wdata = 0, host_rdata;
  logic start = 0, busy, done, through = 0;
  logic [7:0] iters = 1, sweep;
  logic [1:0] ack_dly_sel [4] = '{default: 0};
  logic [3:0] crossed, dr_error;

  gs_solver_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #20_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters
  int n_stuck = 0;
  int n_cross = 0, n_tie = 0, n_dly = 0, n_wb = 0, n_thru_xfer = 0;
  always @(posedge clk) if (rst_n) begin
    n_cross += $countones(crossed);
    if (dut.u_net.g_disp[0].u_disp.c == 2'b11 && !through) n_tie++;
    for (int l = 0; l < 4; l++) if (dut.fu_ack[l] != dut.fu_ack_dly[l]) n_dly++;
    if (dut.wb_we) n_wb++;
    if (through && |dut.u_net.g_disp[2].u_disp.xfer) n_thru_xfer++;
  end

  // Problem: a_ii in 4..7, a_ij in {-1,0,1} for |i-j| <= 2, x_true in -8..8.
  int a [N][N];
  int xt [N];
  int bb [N];
  logic signed [W-1:0] c [N][N];
  logic signed [W-1:0] bq [N];
  logic signed [W-1:0] x0 [N];
  logic signed [W-1:0] xr [N];

  task automatic make_problem();
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) a[i][j] = 0;
      a[i][i] = 4 + $urandom_range(0, 3);
      for (int j = 0; j < N; j++)
        if (j != i && (i - j <= 2) && (j - i <= 2)) a[i][j] = int'($urandom_range(0, 2)) - 1;
      xt[i] = int'($urandom_range(0, 16)) - 8;
    end
    for (int i = 0; i < N; i++) begin
      bb[i] = 0;
      for (int j = 0; j < N; j++) bb[i] += a[i][j] * xt[j];
      bq[i] = W'(bb[i] * 256);
      for (int j = 0; j < N; j++)
        c[i][j] = (i == j) ? W'(256 / a[i][i]) : W'((-256 * a[i][j]) / a[i][i]);
      x0[i] = '0;
    end
  endtask

  // Reference: one sweep of the fixed-point Gauss-Seidel step.
  task automatic ref_sweeps(int sweeps);
    logic signed [ACCW-1:0] s;
    for (int i = 0; i < N; i++) xr[i] = x0[i];
    repeat (sweeps)
      for (int i = 0; i < N; i++) begin
        s = '0;
        for (int j = 0; j < N; j++)
          s += ACCW'(c[i][j]) * ACCW'((j == i) ? bq[i] : xr[j]);
        xr[i] = acc_to_var(s);
      end
  endtask

  task automatic host_write(host_kind_e k, int r, int col, logic signed [W-1:0] v);
    @(negedge clk);
    host_we = 1; host_kind = k; host_row = 5'(r); host_col = 5'(col); host_wdata = v;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic load_all();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) host_write(HOST_COEF, i, j, c[i][j]);
    for (int j = 0; j < N; j++) host_write(HOST_B, 0, j, bq[j]);
  endtask

  task automatic load_x();
    for (int j = 0; j < N; j++) host_write(HOST_X, 0, j, x0[j]);
  endtask

  task automatic run(input logic thr, input int dly, input int sweeps, output int cycles);
    int t0;
    load_x();
    through = thr;
    ack_dly_sel[0] = 2'(dly);
    ack_dly_sel[1] = 2'(dly);
    iters = 8'(sweeps);
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    checks++;
    if (sweep != 8'(sweeps)) begin failures++; $display("FAIL sweep count %0d", sweep); end
  endtask

  task automatic compare(string tag);
    int bad = 0;
    for (int i = 0; i < N; i++) begin
      host_raddr = 5'(i);
      #1;
      checks++;
      if (host_rdata !== xr[i]) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL %s x[%0d] = %0d, expected %0d", tag, i, host_rdata, xr[i]);
      end
    end
  endtask

  int cyc_tab [2][3];
  initial begin
    make_problem();
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_all();
    ref_sweeps(3);
    for (int thr = 0; thr < 2; thr++)
      for (int d = 0; d < 3; d++) begin
        run(thr[0], d, 3, cyc_tab[thr][d]);
        compare($sformatf("through=%0d delay=%0d", thr, d));
        $display("mode %-18s delay elements %0d: %0d cycles, relative %0.3f",
                 thr ? "dispatcher-through" : "normal", d, cyc_tab[thr][d],
                 real'(cyc_tab[thr][d]) / real'(cyc_tab[0][0]));
      end
    // Redistribution pays off once units are degraded.
    for (int d = 1; d < 3; d++) begin
      checks++;
      if (cyc_tab[0][d] >= cyc_tab[1][d]) begin
        failures++;
        $display("FAIL normal mode not faster than through mode with %0d delay elements", d);
      end
    end
    // Convergence to the known solution, within the rounding of the
    // pre-divided coefficients (truncated to 1/256).
    ref_sweeps(20);
    run(1'b0, 2, 20, cyc_tab[0][0]);
    compare("20 sweeps");
    for (int i = 0; i < N; i++) begin
      checks++;
      if (xr[i] - W'(xt[i] * 256) > 48 || W'(xt[i] * 256) - xr[i] > 48) begin
        failures++;
        $display("FAIL no convergence x[%0d] = %0d, true %0d", i, xr[i], xt[i] * 256);
      end
    end
    checks++;
    if (dr_error != 4'b0000) begin failures++; $display("FAIL dual-rail error without fault"); end
    // Stuck-at-1 fault on unit 3.
    load_x();
    through = 0;
    ack_dly_sel = '{default: 0};
    iters = 8'd1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (dut.g_lane[3].u_fu.dr.t[0] !== 1'b1) @(negedge clk);
    force dut.g_lane[3].u_fu.dr.f[0] = 1'b1;
    repeat (3000) @(negedge clk);
    checks += 3;
    if (dr_error != 4'b1000) begin failures++; $display("FAIL stuck-at not flagged: %b", dr_error); end
    if (done)                begin failures++; $display("FAIL result reported despite the fault"); end
    if (dut.fu_req[3] == dut.fu_ack[3]) begin failures++; $display("FAIL faulty unit still acknowledging"); end
    n_stuck = dr_error[3] ? 1 : 0;
    release dut.g_lane[3].u_fu.dr.f[0];
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    $display("mechanisms: redistributions=%0d input_ties=%0d delayed_acks=%0d writebacks=%0d through_transfers=%0d stuck_at_detected=%0d",
             n_cross, n_tie, n_dly, n_wb, n_thru_xfer, n_stuck);
    checks += 6;
    if (n_stuck == 0)     begin failures++; $display("FAIL no stuck-at detection"); end
    if (n_cross == 0)     begin failures++; $display("FAIL no redistribution"); end
    if (n_tie == 0)       begin failures++; $display("FAIL no input tie"); end
    if (n_dly == 0)       begin failures++; $display("FAIL no delayed ack"); end
    if (n_wb == 0)        begin failures++; $display("FAIL no write-back"); end
    if (n_thru_xfer == 0) begin failures++; $display("FAIL no through-mode transfer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
