// tb_data_gen: the generator of lane 2 (columns 16..23 of 32) reads from a
// model memory and is acknowledged by a consumer with random delays. For
// several rows, including rows 16..23 whose diagonal lies in this lane, it
// must issue exactly the 8 pairs (coef[row][k], x[k]) with b[k] in the
// diagonal position, in order, and issue a pair one cycle after the channel
// becomes idle (the first one the cycle after start).
module tb_data_gen;
  import gs_pkg::*;
  localparam int N = 32, K = 8, LANE = 2;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [4:0] row = 0, rd_row;
  logic [2:0] rd_k;
  logic signed [W-1:0] rd_coef, rd_x, rd_b;
  operand_t out_data;
  logic out_req, out_ack = 0;
  int checks = 0, failures = 0;

  data_gen #(.N(N), .K(K), .LANE(LANE)) dut (.*);
  always #5 clk = ~clk;

  // Model memory contents by formula.
  assign rd_coef = W'(rd_row * 100 + rd_k);
  assign rd_x    = W'(16'h4000 + rd_k);
  assign rd_b    = W'(16'h7000 + rd_k);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int rows [6] = '{0, 16, 19, 23, 24, 31};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (rows[r]) begin
      @(negedge clk); start = 1; row = 5'(rows[r]);
      @(negedge clk); start = 0;
      for (int k = 0; k < K; k++) begin
        int wait_c;
        wait_c = 0;
        while (out_req == out_ack && wait_c < 20) begin @(negedge clk); wait_c++; end
        chk(wait_c == 1, $sformatf("row %0d pair %0d issued after %0d idle cycles", rows[r], k, wait_c));
        chk(out_data.coef == W'(rows[r] * 100 + k), $sformatf("row %0d pair %0d coef", rows[r], k));
        chk(out_data.vec == ((LANE * K + k == rows[r]) ? W'(16'h7000 + k) : W'(16'h4000 + k)),
            $sformatf("row %0d pair %0d vector element", rows[r], k));
        repeat ($urandom_range(0, 3)) @(negedge clk);
        out_ack = ~out_ack;
      end
      repeat (4) @(negedge clk);
      chk(!busy && out_req == out_ack, "no extra pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
