// Testbench for display_mux: with MUX_BIT = 2 the two digits must alternate
// every 4 clocks, exactly one enable low at a time, and the segment bus must
// carry the glyph of the digit whose enable is low.
module tb_display_mux;
  logic clk = 0, rst = 1;
  logic [3:0] tens, ones;
  logic [6:0] ssout;
  logic [1:0] ssvdds;
  int checks = 0, failures = 0;
  // active-low glyphs {a..g} of 0-9
  logic [6:0] glyph [10] = '{7'b0000001, 7'b1001111, 7'b0010010, 7'b0000110, 7'b1001100,
                             7'b0100100, 7'b0100000, 7'b0001111, 7'b0000000, 7'b0000100};

  display_mux #(.MUX_BIT(2)) dut (.clk(clk), .rst(rst), .tens(tens), .ones(ones),
                                   .ssout(ssout), .ssvdds(ssvdds));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run, switches;
    logic [1:0] last;
    tens = 4'd3; ones = 4'd8;
    repeat (3) @(posedge clk);
    rst = 0;
    run = 0; switches = 0; last = 2'b10;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      if (i % 50 == 0) begin tens = 4'($urandom_range(0, 9)); ones = 4'($urandom_range(0, 9)); #1; end
      checks++;
      if (ssvdds == 2'b01) begin
        if (ssout !== glyph[tens]) begin failures++; $display("FAIL tens glyph %b", ssout); end
      end else if (ssvdds == 2'b10) begin
        if (ssout !== glyph[ones]) begin failures++; $display("FAIL ones glyph %b", ssout); end
      end else begin
        failures++; $display("FAIL enables %b", ssvdds);
      end
      if (ssvdds != last) begin
        if (i > 4 && run != 4) begin failures++; $display("FAIL digit held %0d clocks", run); end
        switches++; run = 1; last = ssvdds;
      end else run++;
    end
    checks++;
    if (switches < 40) begin failures++; $display("FAIL only %0d switches", switches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
