// Testbench for keypad_ui with shortened time bases (scan bit 1, repeat bit
// 6, multiplex bit 2, blink bit 9). A keypad model answers the column scan.
// Checks: entry of 4 -> 2 -> confirm gives sequence 42 and leaves it on the
// display; cancel restores it; holding UP repeats; the display shows the
// digits being edited and blanks the edited digit only while editing.
module tb_keypad_ui;
  logic clk = 0, rst = 1;
  logic [3:0] rows, columns, mkey = 0;
  logic down = 0;
  logic [6:0] ssout;
  logic [1:0] ssvdds;
  logic [7:0] pnum;
  int checks = 0, failures = 0;
  // active-low glyphs {a..g} of 0-9
  logic [6:0] glyph [10] = '{7'b0000001, 7'b1001111, 7'b0010010, 7'b0000110, 7'b1001100,
                             7'b0100100, 7'b0100000, 7'b0001111, 7'b0000000, 7'b0000100};
  localparam int TICK = 128;   // clocks between repeat ticks

  keypad_ui #(.SCAN_BIT(1), .REPEAT_BIT(6), .MUX_BIT(2), .BLINK_BIT(9)) dut (
    .clk(clk), .rst(rst), .rows(rows), .columns(columns), .ssout(ssout),
    .ssvdds(ssvdds), .pnum(pnum));
  keypad_model kp (.columns(columns), .down(down), .key(mkey), .rows(rows));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (pnum=%h)", msg, pnum); end
  endtask

  // press and release one key: held for ~1.5 repeat ticks
  task automatic key(int k, int hold = TICK * 3 / 2);
    @(posedge clk); mkey <= 4'(k); down <= 1;
    repeat (hold) @(posedge clk);
    down <= 0;
    repeat (TICK * 2) @(posedge clk);
  endtask

  function automatic int glyph_digit(logic [6:0] g);
    for (int d = 0; d < 10; d++) if (glyph[d] == g) return d;
    return -1;
  endfunction

  // Watch the display for n clocks: digits seen on each enable, dark counts.
  task automatic watch(int n, output int tens, output int ones, output int dark_t, output int dark_o);
    tens = -1; ones = -1; dark_t = 0; dark_o = 0;
    repeat (n) begin
      @(posedge clk); #1;
      if (!ssvdds[1]) tens = glyph_digit(ssout);
      if (!ssvdds[0]) ones = glyph_digit(ssout);
      if (ssvdds == 2'b11) begin
        dark_t += 1;   // counted once; split below by phase of the multiplexer
      end
    end
  endtask

  initial begin
    int t, o, d1, d2;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (50) @(posedge clk);
    check(pnum == 8'h00, "reset number 00");

    // State 0 -> 1 with digit 4, display blinks while editing
    key(4);
    watch(2048, t, o, d1, d2);
    check(t == 4, $sformatf("tens shows 4 (saw %0d)", t));
    check(d1 > 0, "edited digit blinks");
    check(pnum == 8'h00, "not yet confirmed");
    key(15); key(2); key(13);
    check(pnum == 8'h42, "4 right 2 confirm -> 42");
    watch(2048, t, o, d1, d2);
    check(t == 4 && o == 2 && d1 == 0, "display 42, no blinking in State 0");

    // cancel
    key(7); key(12);
    check(pnum == 8'h42, "cancel keeps 42");
    watch(512, t, o, d1, d2);
    check(t == 4, "cancel restores the display");

    // holding UP from State 0: first step at once, repeat after 8 ticks
    key(10, TICK * 9 + TICK / 2);
    key(13);
    check(pnum == 8'h44, $sformatf("held UP stepped twice (pnum %h)", pnum));

    // LEFT, DOWN on tens, confirm
    key(14); key(11); key(13);
    check(pnum == 8'h34, "left down confirm -> 34");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
