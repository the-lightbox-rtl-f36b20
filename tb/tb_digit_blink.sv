// Testbench for digit_blink: all input combinations; the edited digit must
// go dark whenever the blink clock is high, the other digit must be untouched.
module tb_digit_blink;
  logic [1:0] prev_en, ssvdds;
  logic blink, inprogress, digselect;
  int checks = 0, failures = 0;

  digit_blink dut (.ssvdds_before(prev_en), .blink(blink), .inprogress(inprogress),
                   .digselect(digselect), .ssvdds(ssvdds));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [1:0] exp;
      {prev_en, blink, inprogress, digselect} = 5'(v);
      exp = prev_en;
      if (inprogress) begin
        if (digselect && blink) exp[1] = 1'b1;       // tens blanked
        if (!digselect && blink) exp[0] = 1'b1;      // ones blanked
      end
      #1;
      checks++;
      if (ssvdds !== exp) begin
        failures++;
        $display("FAIL v=%b ssvdds=%b exp=%b", 5'(v), ssvdds, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
