// tb_adder_tree: random accumulator values, including ones that saturate,
// are summed and scaled; the result is compared with a model of the sum,
// shift by the fraction bits and saturation to 16 bits.
module tb_adder_tree;
  import gs_pkg::*;
  logic signed [ACCW-1:0] acc [4];
  logic signed [W-1:0] x_new;
  int checks = 0, failures = 0;

  adder_tree #(.LANES(4)) dut (.acc, .x_new);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s, q, e;
    for (int n = 0; n < 500; n++) begin
      s = 0;
      for (int l = 0; l < 4; l++) begin
        // Small values mostly; every fifth vector large enough to saturate.
        acc[l] = (n % 5 == 0) ? ACCW'($signed($urandom)) * 4
                              : ACCW'($signed($urandom) >>> 12);
        s += longint'(acc[l]);
      end
      #1;
      q = s >>> FRAC;
      e = (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
      checks++;
      if (longint'(x_new) != e) begin
        failures++;
        $display("FAIL sum %0d -> %0d, expected %0d", s, x_new, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
