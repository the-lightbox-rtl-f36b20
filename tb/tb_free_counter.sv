// Testbench for free_counter: checks reset, counting and wrap-around of a
// narrow counter against an independent count.
module tb_free_counter;
  logic clk = 0, rst = 1;
  logic [3:0] q;
  int checks = 0, failures = 0;
  int expected;

  free_counter #(.WIDTH(4)) dut (.clk(clk), .rst(rst), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1; checks++; if (q !== 4'd0) begin failures++; $display("FAIL reset q=%0d", q); end
    rst = 0;
    expected = 0;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #1;
      expected = (expected + 1) % 16;
      checks++;
      if (q !== 4'(expected)) begin failures++; $display("FAIL cycle %0d q=%0d exp=%0d", i, q, expected); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
