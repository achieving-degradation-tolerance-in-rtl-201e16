// tb_ack_delay_inject: toggles the acknowledge input and measures, for 0, 1
// and 2 selected delay elements, after how many cycles the output follows.
module tb_ack_delay_inject;
  localparam int EL = 3;
  logic clk = 0, rst_n = 0;
  logic [1:0] sel = 0;
  logic ack_in = 0, ack_out;
  int checks = 0, failures = 0;

  ack_delay_inject #(.MAX_EL(2), .EL_CYCLES(EL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++)
      for (int s = 0; s < 3; s++) begin
        sel = 2'(s);
        repeat (8) @(negedge clk);
        ack_in = ~ack_in;
        lat = 0;
        #1;
        while (ack_out != ack_in && lat < 20) begin @(negedge clk); lat++; #1; end
        checks++;
        if (lat != s * EL) begin
          failures++;
          $display("FAIL sel=%0d delay %0d cycles, expected %0d", s, lat, s * EL);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
