// tb_mac_fu: sends random operand pairs to the multiply-accumulate unit over
// its two-phase channel and checks the accumulator against a model, the
// five-cycle request-to-acknowledge time, one done pulse per pair, and the
// accumulator clear. Finally a false rail of the dual-rail register is
// forced high (a stuck-at-1 fault): the unit must report it and must not
// acknowledge.
module tb_mac_fu;
  import gs_pkg::*;
  logic clk = 0, rst_n = 0;
  operand_t in_data = '0;
  logic in_req = 0, in_ack, acc_clr = 0, done, code_err;
  logic signed [ACCW-1:0] acc;
  int checks = 0, failures = 0;

  mac_fu dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_done = 0;
  always @(posedge clk) if (done) n_done++;

  initial begin
    longint model;
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = 0;
    for (int n = 0; n < 200; n++) begin
      in_data.coef = W'($urandom);
      in_data.vec  = W'($urandom);
      model += longint'(in_data.coef) * longint'(in_data.vec);
      in_req = ~in_req;
      lat = 0;
      do begin @(negedge clk); lat++; end while (in_ack != in_req && lat < 50);
      checks++;
      if (lat != 5) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if (longint'(acc) != model) begin
        failures++; $display("FAIL acc %0d expected %0d", acc, model);
      end
      if (n % 50 == 49) begin
        acc_clr = 1; @(negedge clk); acc_clr = 0;
        model = 0;
        checks++;
        if (acc != 0) begin failures++; $display("FAIL clear"); end
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    checks++;
    if (code_err !== 1'b0) begin failures++; $display("FAIL code_err without fault"); end
    // Stuck-at-1 on the false rail of bit 0 while a product with bit 0 = 1
    // is evaluated.
    force dut.dr.f[0] = 1'b1;
    in_data.coef = 16'sd3; in_data.vec = 16'sd5;
    in_req = ~in_req;
    repeat (4) @(negedge clk);
    checks++;
    if (code_err !== 1'b1) begin failures++; $display("FAIL stuck-at not detected"); end
    // The stuck rail keeps the word from returning to the spacer: the unit
    // never acknowledges, so a dispatcher would route around it.
    repeat (10) @(negedge clk);
    checks++;
    if (in_ack == in_req) begin failures++; $display("FAIL faulty unit acknowledged"); end
    release dut.dr.f[0];
    checks++;
    if (n_done != 200) begin failures++; $display("FAIL %0d done pulses", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
