// tb_completion_detector: drives a dual-rail word through spacer, partly
// valid, fully valid, partly returned and spacer states and checks that the
// completion output rises only on a fully valid word, holds in between, and
// falls only on a full spacer, one clock after the rails settle. Words with
// a bit whose two rails are both high must raise `invalid`; code words and
// spacers must not.
module tb_completion_detector;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] t = '0, f = '0;
  logic done, invalid;
  int checks = 0, failures = 0;

  completion_detector #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic [N-1:0] tv, logic [N-1:0] fv, logic exp, string what);
    @(negedge clk); t = tv; f = fv;
    @(negedge clk);
    checks++;
    if (done !== exp) begin failures++; $display("FAIL %s: done=%b", what, done); end
    checks++;
    if (invalid !== 1'b0) begin failures++; $display("FAIL %s: invalid raised", what); end
  endtask

  initial begin
    logic [N-1:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      v = N'($urandom);
      step('0, '0, 1'b0, "spacer");
      step(v & 8'h0F, ~v & 8'h0F, 1'b0, "half valid");
      step(v, ~v, 1'b1, "valid");
      // The output is registered: it still holds until the next clock edge.
      @(negedge clk); t = '0; f = '0;
      #1;
      checks++;
      if (done !== 1'b1) begin failures++; $display("FAIL fell too early"); end
      @(negedge clk);
      checks++;
      if (done !== 1'b0) begin failures++; $display("FAIL did not fall"); end
      step(v & 8'hF0, ~v & 8'hF0, 1'b0, "half valid after spacer");
      step(v, ~v, 1'b1, "valid again");
      step(v & 8'h3C, ~v & 8'h3C, 1'b1, "partly returned holds");
    end
    // Stuck-at-1 on one rail of a valid word gives a non-code bit.
    for (int b = 0; b < N; b++) begin
      v = N'($urandom);
      @(negedge clk); t = v | (N'(1) << b); f = ~v | (N'(1) << b);
      #1;
      checks++;
      if (invalid !== 1'b1) begin failures++; $display("FAIL stuck rail on bit %0d not flagged", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
