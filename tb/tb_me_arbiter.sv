// tb_me_arbiter: exhaustive test of the two-input mutual-exclusion element:
// a single request is granted, no request gets no grant, and a tie is
// granted to the preferred side.
module tb_me_arbiter;
  logic [1:0] r, g;
  logic prefer;
  int checks = 0, failures = 0;

  me_arbiter dut (.r, .prefer, .g);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int i = 0; i < 8; i++) begin
      r = 2'(i); prefer = i[2];
      #1;
      if (r == 2'b11) exp = prefer ? 2'b10 : 2'b01;
      else            exp = r;
      checks++;
      if (g !== exp) begin
        failures++;
        $display("FAIL r=%b prefer=%b g=%b expected %b", r, prefer, g, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
