// Testbench for key_repeat: counts keystrokes for presses of several
// lengths, measured in ticks, against the rule "one at the first tick, then
// one every REPEAT_TICKS ticks while held".
module tb_key_repeat;
  logic clk = 0, rst = 1, tick = 0, pressed = 0, strobe;
  int checks = 0, failures = 0;
  int strobes = 0;
  localparam int RT = 8;

  key_repeat #(.REPEAT_TICKS(RT)) dut (.clk(clk), .rst(rst), .tick(tick),
                                       .pressed(pressed), .strobe(strobe));
  always #5 clk = ~clk;
  always @(posedge clk) if (strobe) strobes++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_tick();
    @(posedge clk); tick <= 1;
    @(posedge clk); tick <= 0;
    repeat (3) @(posedge clk);
  endtask

  // Hold the key over n ticks, then release over 2 ticks.
  task automatic press(int n);
    int start, exp;
    start = strobes;
    pressed <= 1;
    for (int i = 0; i < n; i++) do_tick();
    pressed <= 0;
    do_tick(); do_tick();
    exp = (n == 0) ? 0 : 1 + (n - 1) / RT;
    checks++;
    if (strobes - start != exp) begin
      failures++;
      $display("FAIL press of %0d ticks gave %0d strobes, exp %0d", n, strobes - start, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // held with no tick: nothing
    pressed <= 1; repeat (50) @(posedge clk); pressed <= 0;
    checks++; if (strobes != 0) begin failures++; $display("FAIL strobe without tick"); end
    press(1); press(2); press(8); press(9); press(17); press(30); press(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
