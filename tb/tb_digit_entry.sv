// Testbench for digit_entry: a directed walk through States 0-2 (entry of
// 4 then 2 and confirm, cancel restoring, arrow keys and wrap), then 3000
// random keystrokes checked against a reference model of the entry rules.
module tb_digit_entry;
  import lightbox_pkg::*;
  logic clk = 0, rst = 1, key_valid = 0;
  key_e key;
  logic [3:0] tens_digit, ones_digit, tens_temp, ones_temp;
  logic inprogress, digselect;
  int checks = 0, failures = 0;
  // reference state: st 0 = showing active number, 1 = tens, 2 = ones
  int st, t, o, at, ao;

  digit_entry dut (.clk(clk), .rst(rst), .key_valid(key_valid), .key(key),
                   .tens_digit(tens_digit), .ones_digit(ones_digit),
                   .tens_temp(tens_temp), .ones_temp(ones_temp),
                   .inprogress(inprogress), .digselect(digselect));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int up(int d);   return (d + 1) % 10; endfunction
  function automatic int dn(int d);   return (d + 9) % 10; endfunction

  task automatic model(int k);
    case (k)
      13: begin at = t; ao = o; st = 0; end
      12: begin t = at; o = ao; st = 0; end
      10, 11: if (st == 1) t = (k == 10) ? up(t) : dn(t);
              else begin o = (k == 10) ? up(o) : dn(o); st = 2; end
      14: if (st != 1) st = 1;
      15: if (st != 2) st = 2;
      default: if (st == 2) o = k; else begin t = k; st = 1; end
    endcase
  endtask

  task automatic press(int k, string tag = "");
    @(posedge clk);
    key <= key_e'(k); key_valid <= 1;
    @(posedge clk);
    key_valid <= 0;
    model(k);
    #1;
    checks++;
    if (tens_temp != 4'(t) || ones_temp != 4'(o) || tens_digit != 4'(at) ||
        ones_digit != 4'(ao) || inprogress != (st != 0) ||
        (st != 0 && digselect != (st == 1))) begin
      failures++;
      $display("FAIL %s key %0d: temp %0d%0d act %0d%0d ip %b ds %b | exp %0d%0d %0d%0d st %0d",
               tag, k, tens_temp, ones_temp, tens_digit, ones_digit, inprogress, digselect,
               t, o, at, ao, st);
    end
  endtask

  task automatic expect_active(int v, string tag);
    checks++;
    if (tens_digit * 10 + ones_digit != v) begin
      failures++;
      $display("FAIL %s: active %0d%0d exp %0d", tag, tens_digit, ones_digit, v);
    end
  endtask

  initial begin
    st = 0; t = 0; o = 0; at = 0; ao = 0;
    key = KEY_0;
    repeat (3) @(posedge clk);
    rst = 0;
    // 4, right, 2, confirm -> 42
    press(4, "tens"); press(15, "right"); press(2, "ones"); press(13, "confirm");
    expect_active(42, "entry 42");
    // 7, cancel -> still 42, display restored
    press(7); press(12, "cancel");
    expect_active(42, "cancel");
    // up from State 0 goes to ones: 43; left, down twice on tens: 23; confirm
    press(10); press(14); press(11); press(11); press(13);
    expect_active(23, "arrows");
    // wrap: tens 0 -> down -> 9
    press(0); press(11); press(13);
    expect_active(93, "wrap");
    // random keystrokes
    for (int i = 0; i < 3000; i++) press($urandom_range(0, 15), "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
