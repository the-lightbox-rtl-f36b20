// Testbench for keypad_scanner: with no key the columns must walk through
// 1110, 1101, 1011, 0111 one step per tick; with a key held the scan must
// stop on its column and report the key; after release the scan resumes.
module tb_keypad_scanner;
  import lightbox_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  logic [3:0] rows, columns, mkey;
  logic pressed, down = 0;
  key_e key;
  int checks = 0, failures = 0;

  keypad_scanner dut (.clk(clk), .rst(rst), .tick(tick), .rows(rows),
                      .columns(columns), .pressed(pressed), .key(key));
  keypad_model kp (.columns(columns), .down(down), .key(mkey), .rows(rows));
  always #5 clk = ~clk;

  // tick every 8 clocks
  int tcount = 0;
  always @(posedge clk) begin
    tcount <= tcount + 1;
    tick   <= (tcount % 8 == 7);
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] last;
    int changes;
    mkey = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // idle walk: every change of columns must be a rotate-left by one
    last = columns; changes = 0;
    repeat (200) begin
      @(posedge clk); #1;
      if (columns != last) begin
        check(columns == {last[2:0], last[3]}, $sformatf("walk %b->%b", last, columns));
        check($countones(~columns) == 1, "one column low");
        changes++;
        last = columns;
      end
    end
    check(changes >= 20, $sformatf("scan ran (%0d steps)", changes));
    // each of the 16 keys
    for (int k = 0; k < 16; k++) begin
      mkey = 4'(k); down = 1;
      repeat (120) @(posedge clk);
      #1;
      check(pressed === 1'b1, $sformatf("pressed for key %0d", k));
      check(int'(key) == k, $sformatf("key %0d read as %0d", k, key));
      last = columns;
      repeat (64) @(posedge clk);
      #1;
      check(columns == last && pressed, $sformatf("scan paused on key %0d", k));
      down = 0;
      repeat (60) @(posedge clk);
      #1;
      check(!pressed, $sformatf("released key %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
