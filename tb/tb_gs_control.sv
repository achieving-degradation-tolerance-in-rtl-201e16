// tb_gs_control: plays the functional units by sending done pulses (random
// numbers per cycle) and checks that the controller starts every row in
// order, writes back exactly once per row after all 32 products and never
// earlier, clears the accumulators with the write-back, counts sweeps and
// raises done after the requested number of sweeps.
module tb_gs_control;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, start = 0, busy, done, row_start, acc_clr, wb_we;
  logic [7:0] iters = 3, iter;
  logic [3:0] fu_done = 0;
  logic [4:0] row, wb_row;
  int checks = 0, failures = 0;

  gs_control #(.N(N), .LANES(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int sent;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < N; i++) begin
        while (!row_start) @(negedge clk);
        chk(int'(row) == i && iter == 8'(s), $sformatf("row %0d sweep %0d started (row=%0d)", i, s, row));
        sent = 0;
        while (sent < N) begin
          @(negedge clk);
          chk(!wb_we, "no write-back before all products");
          fu_done = 4'($urandom);
          if (sent + $countones(fu_done) > N) fu_done = 0;
          sent += $countones(fu_done);
        end
        @(negedge clk); fu_done = 0;
        while (!wb_we) @(negedge clk);
        chk(int'(wb_row) == i && acc_clr, $sformatf("write-back row %0d", i));
        @(negedge clk);
        chk(!wb_we, "single write-back");
      end
    repeat (2) @(negedge clk);
    chk(done && !busy && iter == 3, "done after 3 sweeps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
