// Testbench for light_sequencer: selects sequences one after another and
// drives the band bits, checking the lights after each cue: direct
// following, band-5 chases (and the 4-clock cue latency), band-2 pacing,
// rises of bands 3..1, the either-or sequences on both edges of band 5, the
// timed explode (idle at rest until a hit, then slow-clock steps back to
// rest), slow-clock random groups and the random history sequence.
// The slow clock is bit 4 of the counter (a tick every 32 clocks).
module tb_light_sequencer;
  logic clk = 0, rst = 1;
  logic [7:0] ch = '0, pnum = '0, lights;
  int checks = 0, failures = 0;

  light_sequencer #(.SLOW_BIT(4)) dut (.clk(clk), .rst(rst), .channel_in(ch),
                                       .pnum(pnum), .lights(lights));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (lights=%h)", msg, lights); end
  endtask

  task automatic select(int n);
    @(posedge clk);
    pnum <= {4'(n / 10), 4'(n % 10)};
    ch   <= '0;
    repeat (8) @(posedge clk);
  endtask

  // one pulse on the given bands: high for 6 clocks, low for 6
  task automatic pulse(logic [7:0] m);
    @(posedge clk); ch <= ch | m;
    repeat (6) @(posedge clk); ch <= ch & ~m;
    repeat (6) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [7:0] seen, prev;
    int lat, changes;
    repeat (3) @(posedge clk);
    rst = 0;

    // 00: lights follow the bands
    select(0);
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); ch <= 8'($urandom);
      repeat (5) @(posedge clk); #1;
      check(lights == ch, "00 follows bands");
    end

    // 01: centre pair moving out on band-5 rises; latency of 4 clocks
    select(1); #1;
    check(lights == 8'h18, "01 start");
    @(posedge clk); ch <= 8'h20;
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (lights == 8'h18 && lat < 20);
    check(lat == 4 && lights == 8'h24, $sformatf("01 first step after %0d clocks", lat));
    repeat (6) @(posedge clk); ch <= '0; repeat (6) @(posedge clk);
    pulse(8'h20); check(lights == 8'h42, "01 step 2");
    pulse(8'h01); check(lights == 8'h42, "01 ignores band 0");
    pulse(8'h20); check(lights == 8'h81, "01 step 3");
    pulse(8'h20); check(lights == 8'h18, "01 wraps");

    // 60: single light chasing left
    select(60); #1; check(lights == 8'h80, "60 start");
    pulse(8'h20); check(lights == 8'h01, "60 step 1");
    pulse(8'h20); check(lights == 8'h02, "60 step 2");

    // 44: paced chase stepped by band 2 only
    select(44); #1; check(lights == 8'h06, "44 start");
    pulse(8'h20); check(lights == 8'h06, "44 ignores band 5");
    pulse(8'h04); check(lights == 8'h14, "44 step on band 2");

    // 27: random adjacent pair on rises of band 1
    select(27);
    pulse(8'h02);
    check($countones(lights) == 2 && ((lights & {lights[6:0], lights[7]}) != 0),
          "27 adjacent pair");

    // 30 and 24: lit while band 5 is high
    select(30);
    @(posedge clk); ch <= 8'h20; repeat (6) @(posedge clk); #1;
    check(lights == 8'hFF, "30 on while band 5 high");
    ch <= 8'h00; repeat (6) @(posedge clk); #1;
    check(lights == 8'h00, "30 off when low");
    select(24);
    @(posedge clk); ch <= 8'h20; repeat (6) @(posedge clk); #1;
    check(lights == 8'hF0 || lights == 8'h0F, "24 half while high");
    ch <= 8'h00; repeat (6) @(posedge clk); #1;
    check(lights == 8'h00, "24 off when low");
    select(80);
    @(posedge clk); ch <= 8'h20; repeat (6) @(posedge clk); #1;
    check(lights == 8'h00, "80 inverted");

    // 05: explode waits at rest, then runs on the slow clock back to rest
    select(5);
    repeat (200) @(posedge clk); #1;
    check(lights == 8'h18, "05 waits at rest");
    @(posedge clk); ch <= 8'h20;
    repeat (6) @(posedge clk); #1;
    check(lights == 8'h3C, "05 hit starts explode");
    ch <= 8'h00;
    seen = 8'h3C; changes = 0;
    repeat (400) begin
      @(posedge clk); #1;
      if (lights != seen) begin changes++; seen = lights; end
    end
    check(changes == 5 && lights == 8'h18, $sformatf("05 ran %0d slow steps back to rest", changes));

    // 29: random groups change on slow ticks without any band activity
    select(29);
    prev = lights; changes = 0;
    repeat (640) begin
      @(posedge clk); #1;
      if (lights != prev) begin changes++; prev = lights; end
    end
    check(changes >= 5, $sformatf("29 changed %0d times on the slow clock", changes));

    // 25: random light kept for two band-5 rises
    select(25);
    pulse(8'h20);
    for (int i = 0; i < 10; i++) begin
      seen = lights;
      pulse(8'h20);
      check((lights & seen) != 0, "25 a light stays lit over the next rise");
      check($countones(lights) inside {1, 2}, "25 one or two lights");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
