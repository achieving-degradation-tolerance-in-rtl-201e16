// tb_dispatcher: two producers and two consumers with random response
// times around one dispatcher.
//
// Directed part: with output 0 busy, a second datum arriving at input 0 must
// go to output 1 one cycle later (redistribution), and a datum whose straight
// output is idle must go straight. Random part, in normal and through mode:
// every datum sent must arrive exactly once and unchanged, in through mode
// only on its own lane, and an input must be acknowledged on the cycle its
// datum appears at an output.
module tb_dispatcher;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0, through = 0;
  logic [DW-1:0] in_data [2], out_data [2];
  logic [1:0] in_req = 0, in_ack, out_req, out_ack = 0, xfer;
  logic crossed;
  int checks = 0, failures = 0;

  dispatcher #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Scoreboard: value -> count outstanding; lane -> expected out in through mode.
  int sent [int];
  int recv_total = 0, sent_total = 0;
  int busy_left [2] = '{0, 0};
  logic [1:0] ack_seen;
  bit random_phase = 0;

  // Consumers: take a datum when req toggles, hold it busy for random cycles.
  always @(negedge clk) if (rst_n && random_phase) begin
    for (int k = 0; k < 2; k++) begin
      if (out_req[k] != out_ack[k]) begin
        if (busy_left[k] == 0) begin
          int v;
          v = int'(out_data[k]);
          if (!sent.exists(v)) chk(0, $sformatf("unexpected datum %0h at out%0d", v, k));
          else begin
            if (through) chk(v[15] == k[0], $sformatf("through mode: lane %0d datum at out%0d", v[15], k));
            sent[v]--;
            if (sent[v] == 0) sent.delete(v);
          end
          recv_total++;
          out_ack[k] = ~out_ack[k];
          busy_left[k] = (k == 0) ? $urandom_range(0, 6) : $urandom_range(0, 2);
        end else busy_left[k]--;
      end
    end
  end

  // Ack and transfer happen on the same edge.
  // Every input ack toggle is matched by an output req toggle on that edge.
  logic [1:0] req_seen;
  always @(posedge clk) if (rst_n) begin
    ack_seen = in_ack;
    req_seen = out_req;
    #1;
    if (in_ack != ack_seen || out_req != req_seen)
      chk($countones(in_ack ^ ack_seen) == $countones(out_req ^ req_seen),
          "ack toggles match transfers");
  end

  int seq = 0;
  task automatic produce(int n);
    int left [2];
    left = '{n, n};
    while (left[0] + left[1] > 0) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++)
        if (left[k] > 0 && in_req[k] == in_ack[k] && $urandom_range(0, 3) != 0) begin
          in_data[k] = DW'({k[0], 15'(seq++)});
          sent[int'(in_data[k])] = 1;
          sent_total++;
          in_req[k] = ~in_req[k];
          left[k]--;
        end
    end
    repeat (40) @(negedge clk);
  endtask

  initial begin
    in_data = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Directed: first datum goes straight to out0 one cycle later.
    @(negedge clk); in_data[0] = 16'h00A1; in_req[0] = 1;
    @(negedge clk);
    chk(out_req == 2'b01 && out_data[0] == 16'h00A1 && in_ack[0] == 1, "first datum straight to out0");
    // out0 still busy (no ack): second datum from input 0 goes to out1.
    in_data[0] = 16'h00B2; in_req[0] = 0;
    @(negedge clk);
    chk(out_req == 2'b11 && out_data[1] == 16'h00B2 && in_ack[0] == 0, "second datum redirected to out1");
    // Both outputs busy: a third datum waits.
    in_data[0] = 16'h00C3; in_req[0] = 1;
    repeat (3) @(negedge clk);
    chk(in_ack[0] == 0 && out_data[0] == 16'h00A1, "third datum waits while both outputs busy");
    // out0 acknowledges: third datum goes to out0.
    out_ack[0] = 1;
    @(negedge clk);
    chk(in_ack[0] == 1 && out_data[0] == 16'h00C3 && out_req[0] == 0, "third datum to out0 after its ack");
    out_ack[1] = 1; out_ack[0] = 0;
    repeat (2) @(negedge clk);
    chk(out_req == out_ack, "outputs idle");

    random_phase = 1;
    produce(300);
    chk(sent.num() == 0 && recv_total == sent_total, $sformatf("normal mode: %0d sent, %0d received", sent_total, recv_total));
    through = 1;
    produce(300);
    chk(sent.num() == 0 && recv_total == sent_total, $sformatf("through mode: %0d sent, %0d received", sent_total, recv_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
