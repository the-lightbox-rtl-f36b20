// Testbench for light_cue: random band and slow-clock waveforms; every
// strobe is compared with edges found by the testbench on its own delayed
// copy of the inputs (three clocks of latency), and ch_sync with the input
// two clocks earlier.
module tb_light_cue;
  logic clk = 0, rst = 1, slow = 0;
  logic [7:0] ch = '0, ch_sync;
  logic rise5, fall5, rise2, rise321, slow_tick;
  int checks = 0, failures = 0;
  int n5r = 0, n5f = 0, n2 = 0, n321 = 0, nslow = 0;
  logic [7:0] h [4];
  logic sh [3];

  light_cue dut (.clk(clk), .rst(rst), .channel_in(ch), .slow(slow), .ch_sync(ch_sync),
                 .rise5(rise5), .fall5(fall5), .rise2(rise2), .rise321(rise321),
                 .slow_tick(slow_tick));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) h[i] = '0;
    for (int i = 0; i < 3; i++) sh[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      // history of what the inputs were at the last few edges
      h[3] = h[2]; h[2] = h[1]; h[1] = h[0]; h[0] = ch;
      sh[2] = sh[1]; sh[1] = sh[0]; sh[0] = slow;
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) ch = 8'($urandom);
      if ($urandom_range(0, 9) == 0) slow = ~slow;
      #1;
      if (i > 4) begin
        logic e5r, e5f, e2, e321, es;
        e5r  = h[1][5] & ~h[2][5];
        e5f  = ~h[1][5] & h[2][5];
        e2   = h[1][2] & ~h[2][2];
        e321 = |(h[1][3:1] & ~h[2][3:1]);
        es   = slow & ~sh[0];
        checks++;
        if (ch_sync !== h[1] || rise5 !== e5r || fall5 !== e5f || rise2 !== e2 ||
            rise321 !== e321 || slow_tick !== es) begin
          failures++;
          $display("FAIL cycle %0d sync=%h/%h r5 %b/%b f5 %b/%b r2 %b/%b r321 %b/%b s %b/%b", i,
                   ch_sync, h[1], rise5, e5r, fall5, e5f, rise2, e2, rise321, e321, slow_tick, es);
        end
        n5r += rise5; n5f += fall5; n2 += rise2; n321 += rise321; nslow += slow_tick;
      end
    end
    checks++;
    if (n5r == 0 || n5f == 0 || n2 == 0 || n321 == 0 || nslow == 0) begin
      failures++; $display("FAIL some event never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
