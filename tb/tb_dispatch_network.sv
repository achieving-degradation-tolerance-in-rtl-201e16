// tb_dispatch_network: four producers and four consumers with random
// response times around the two-column dispatcher network.
//
// Every datum must arrive exactly once and unchanged. In normal mode each
// producer's data must reach more than one consumer when consumers are slow
// (redistribution, including across the crossed middle wires); with
// consumers 0 and 1 very slow, they must receive clearly fewer data than 2
// and 3. In through mode generator l must only reach consumer l, with
// generators 1 and 2 swapped by the crossing.
module tb_dispatch_network;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0, through = 0;
  logic [DW-1:0] in_data [4], out_data [4];
  logic [3:0] in_req = 0, in_ack, out_req, out_ack = 0, crossed;
  int checks = 0, failures = 0;

  dispatch_network #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int sent [int];
  int route [4][4];         // route[src][dst]
  int recv [4];
  int slow [4];
  int busy_left [4];
  int n_cross = 0;

  always @(posedge clk) if (rst_n) n_cross += $countones(crossed);

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < 4; k++) begin
      if (out_req[k] != out_ack[k]) begin
        if (busy_left[k] == 0) begin
          int v;
          v = int'(out_data[k]);
          if (!sent.exists(v)) chk(0, $sformatf("unexpected datum %0h at out%0d", v, k));
          else begin
            sent.delete(v);
            route[v[13:12]][k]++;
          end
          recv[k]++;
          out_ack[k] = ~out_ack[k];
          busy_left[k] = $urandom_range(0, slow[k]);
        end else busy_left[k]--;
      end
    end
  end

  int seq = 0;
  task automatic produce(int n);
    int left [4];
    left = '{n, n, n, n};
    route = '{default: 0};
    recv = '{default: 0};
    while (left[0] + left[1] + left[2] + left[3] > 0) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++)
        if (left[k] > 0 && in_req[k] == in_ack[k]) begin
          in_data[k] = DW'({2'b00, k[1:0], 12'(seq++)});
          sent[int'(in_data[k])] = 1;
          in_req[k] = ~in_req[k];
          left[k]--;
        end
    end
    repeat (200) @(negedge clk);
    chk(sent.num() == 0, $sformatf("%0d data lost", sent.num()));
  endtask

  initial begin
    in_data = '{default: '0};
    busy_left = '{default: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Normal mode, consumers 0 and 1 degraded.
    slow = '{12, 12, 1, 1};
    produce(200);
    chk(recv[0] + recv[1] < (recv[2] + recv[3]) / 2,
        $sformatf("slow units got %0d+%0d, fast units %0d+%0d", recv[0], recv[1], recv[2], recv[3]));
    chk(route[0][2] + route[0][3] > 0, "lane 0 data redistributed to units 2/3");
    chk(route[1][2] + route[1][3] > 0, "lane 1 data redistributed to units 2/3");
    chk(route[2][0] + route[2][1] + route[2][3] > 0, "lane 2 data redistributed");
    chk(n_cross > 0, "crossed pulses seen");
    // Through mode: fixed lane mapping 0->0, 1->2, 2->1, 3->3.
    through = 1;
    produce(100);
    for (int s = 0; s < 4; s++) begin
      int d;
      d = (s == 1) ? 2 : (s == 2) ? 1 : s;
      chk(route[s][d] == 100, $sformatf("through: lane %0d -> unit %0d got %0d", s, d, route[s][d]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
