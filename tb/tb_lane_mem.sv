// tb_lane_mem: fills the coefficient, x and b arrays through the host port,
// reads them back through the generator and host read ports, and checks that
// write-back updates x and wins over a simultaneous host write.
module tb_lane_mem;
  import gs_pkg::*;
  localparam int N = 32, K = 8;
  logic clk = 0;
  logic host_we = 0, wb_we = 0;
  host_kind_e host_kind = HOST_COEF;
  logic [4:0] host_row = 0, rd_row = 0;
  logic [2:0] host_k = 0, hr_k = 0, wb_k = 0, rd_k = 0;
  logic signed [W-1:0] host_wdata = 0, wb_data = 0, hr_x, rd_coef, rd_x, rd_b;
  int checks = 0, failures = 0;

  lane_mem #(.N(N), .K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] pat(int kind, int r, int k);
    return W'(kind * 16'h3001 + r * 16'h0107 + k * 16'h0031);
  endfunction

  task automatic wr(host_kind_e kd, int r, int k, logic signed [W-1:0] v);
    @(negedge clk); host_we = 1; host_kind = kd; host_row = 5'(r); host_k = 3'(k); host_wdata = v;
    @(negedge clk); host_we = 0;
  endtask

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int r = 0; r < N; r++)
      for (int k = 0; k < K; k++) wr(HOST_COEF, r, k, pat(0, r, k));
    for (int k = 0; k < K; k++) begin
      wr(HOST_X, 0, k, pat(1, 0, k));
      wr(HOST_B, 0, k, pat(2, 0, k));
    end
    for (int r = 0; r < N; r++)
      for (int k = 0; k < K; k++) begin
        rd_row = 5'(r); rd_k = 3'(k); hr_k = 3'(k); #1;
        chk(rd_coef == pat(0, r, k), $sformatf("coef[%0d][%0d]", r, k));
        chk(rd_x == pat(1, 0, k) && hr_x == pat(1, 0, k), $sformatf("x[%0d]", k));
        chk(rd_b == pat(2, 0, k), $sformatf("b[%0d]", k));
      end
    // Write-back alone, then together with a host write to the same entry.
    @(negedge clk); wb_we = 1; wb_k = 3; wb_data = 16'sh1234;
    @(negedge clk); wb_we = 0; hr_k = 3; #1;
    chk(hr_x == 16'sh1234, "write-back");
    @(negedge clk); wb_we = 1; wb_k = 5; wb_data = 16'sh0555;
    host_we = 1; host_kind = HOST_X; host_k = 5; host_wdata = 16'sh0AAA;
    @(negedge clk); wb_we = 0; host_we = 0; hr_k = 5; #1;
    chk(hr_x == 16'sh0555, "write-back wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
