// Testbench for seven_seg: every hex digit against a table written as the
// list of lit segment letters.
module tb_seven_seg;
  logic [3:0] s;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  seven_seg dut (.s(s), .seg(seg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] exp_on;
      s = 4'(d);
      exp_on = '0;
      foreach (lit[d][k]) exp_on[6 - (lit[d][k] - "a")] = 1'b1;   // seg[6] = a
      #1;
      checks++;
      if (seg !== ~exp_on) begin
        failures++;
        $display("FAIL digit %0d seg=%b exp=%b", d, seg, ~exp_on);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
