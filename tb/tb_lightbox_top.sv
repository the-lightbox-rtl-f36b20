// End-to-end testbench of lightbox_top with shortened time bases (scan bit
// 1, repeat bit 6, multiplex bit 2, blink bit 9, slow-light bit 5). A keypad
// model answers the column scan; a sample source plays band levels as sets
// of A/D samples. For a series of sequences it types the number on the
// keypad, plays audio and checks the lights. Every mechanism of the design
// is counted and must occur at least once: thresholding, direct following,
// inversion, chase right and left, band-2 and bands-3..1 cues, both edges
// of band 5, the slow clock, the timed explode leaving rest, and on the
// keypad the two editing states, arrows, repeat, cancel, confirm, scan
// pause and blinking.
module tb_lightbox_top;
  logic clk = 0, rst = 1;
  logic [9:0] sample [8];
  logic sample_valid = 0;
  logic [3:0] rows, columns, mkey = 0;
  logic down = 0;
  logic [1:0] ssvdds;
  logic [6:0] ssout;
  logic [7:0] lights_out, channel_in, pnum;
  int checks = 0, failures = 0;
  localparam int TICK = 128;
  int mult [8] = '{1, 1, 2, 2, 2, 3, 5, 5};

  typedef enum int {M_THRESH, M_DIRECT, M_INVERT, M_CHASE_R, M_CHASE_L, M_RISE2, M_RISE321,
                    M_BOTH5, M_SLOW, M_TIMED, M_TENS, M_ONES, M_ARROW, M_REPEAT, M_CANCEL,
                    M_CONFIRM, M_PAUSE, M_BLINK, M_COUNT} mech_e;
  int seen [M_COUNT];

  lightbox_top #(.SCAN_BIT(1), .REPEAT_BIT(6), .MUX_BIT(2), .BLINK_BIT(9), .SLOW_BIT(5)) dut (
    .clk(clk), .rst(rst), .sample(sample), .sample_valid(sample_valid), .rows(rows),
    .columns(columns), .ssvdds(ssvdds), .ssout(ssout), .lights_out(lights_out),
    .channel_in(channel_in), .pnum(pnum));
  keypad_model kp (.columns(columns), .down(down), .key(mkey), .rows(rows));
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (lights=%h ch=%h pnum=%h)", msg, lights_out, channel_in, pnum); end
  endtask

  // Scan pause and blink monitors. A blanked display (both enables high)
  // belongs to the digit whose slot it interrupts: after the ones digit was
  // shown (enables 10) the tens slot comes next.
  logic [3:0] col_q;
  logic [1:0] last_en = 2'b01;
  int paused_for = 0, tens_blank = 0, ones_blank = 0;
  always @(posedge clk) begin
    col_q <= columns;
    if (down && columns == col_q) paused_for <= paused_for + 1; else paused_for <= 0;
    if (paused_for == 64) seen[M_PAUSE]++;
    if (ssvdds == 2'b11) begin
      if (last_en == 2'b10) tens_blank <= tens_blank + 1;
      else                  ones_blank <= ones_blank + 1;
    end else last_en <= ssvdds;
  end

  // ---- keypad ----
  task automatic key(int k, int hold = TICK * 3 / 2);
    @(posedge clk); mkey <= 4'(k); down <= 1;
    repeat (hold) @(posedge clk);
    down <= 0;
    repeat (TICK * 2) @(posedge clk);
  endtask

  task automatic select(int n);
    int tb0, ob0;
    key(n / 10);
    tb0 = tens_blank; ob0 = ones_blank;
    repeat (1100) @(posedge clk);
    check(tens_blank > tb0 && ones_blank == ob0, "tens digit blinks in State 1");
    if (tens_blank > tb0) seen[M_TENS]++;
    key(15);
    tb0 = tens_blank; ob0 = ones_blank;
    repeat (1100) @(posedge clk);
    check(ones_blank > ob0 && tens_blank == tb0, "ones digit blinks in State 2");
    if (ones_blank > ob0) seen[M_ONES]++;
    key(n % 10);
    key(13);
    check(pnum == {4'(n / 10), 4'(n % 10)}, $sformatf("selected %02d", n));
    tb0 = tens_blank; ob0 = ones_blank;
    repeat (1100) @(posedge clk);
    check(tens_blank == tb0 && ones_blank == ob0, "no blinking in State 0");
    seen[M_CONFIRM]++;
    seen[M_BLINK] += (tens_blank > 0 && ones_blank > 0);
  endtask

  // ---- audio: make exactly the bands of m hot ----
  function automatic logic [7:0] ref_hot(int v [8]);
    int sum;
    logic [7:0] h;
    sum = 0;
    for (int i = 0; i < 8; i++) sum += v[i] * mult[i];
    for (int i = 0; i < 8; i++) h[i] = (v[i] * mult[i] > sum / 8);
    return h;
  endfunction

  task automatic bands(logic [7:0] m);
    int v [8];
    for (int i = 0; i < 8; i++) v[i] = m[i] ? 600 : ((m == 0) ? 0 : $urandom_range(0, 5));
    @(posedge clk);
    for (int i = 0; i < 8; i++) sample[i] <= 10'(v[i]);
    sample_valid <= 1;
    @(posedge clk); sample_valid <= 0;
    @(posedge clk); #1;
    check(channel_in == ref_hot(v), "threshold");
    if (channel_in == m) seen[M_THRESH]++;
    repeat (6) @(posedge clk); #1;
  endtask

  task automatic hit(logic [7:0] m);
    bands(m);
    bands(8'h00);
  endtask

  initial begin
    logic [7:0] prev;
    int changes;
    for (int i = 0; i < 8; i++) sample[i] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);

    // 00 direct
    for (int i = 0; i < 10; i++) begin
      logic [7:0] m;
      m = 8'($urandom_range(1, 127));
      bands(m);
      check(lights_out == channel_in, "00 lights follow bands");
      if (lights_out == channel_in && m != 0) seen[M_DIRECT]++;
    end

    bands(8'h00);

    // 10 chase right on band 5
    select(10);
    check(lights_out == 8'h80, "10 start");
    hit(8'h20); check(lights_out == 8'h40, "10 step");
    hit(8'h20); check(lights_out == 8'h20, "10 step 2");
    if (lights_out == 8'h20) seen[M_CHASE_R]++;
    hit(8'h04); check(lights_out == 8'h20, "10 ignores band 2");

    // 60 chase left, 50 inverted direct
    select(60);
    hit(8'h20); check(lights_out == 8'h01, "60 left");
    if (lights_out == 8'h01) seen[M_CHASE_L]++;
    select(50);
    bands(8'h0C); check(lights_out == ~channel_in, "50 inverted");
    if (lights_out == ~channel_in) seen[M_INVERT]++;

    // 38 on band 5 vs 44 on band 2
    select(44);
    hit(8'h20); check(lights_out == 8'h06, "44 ignores band 5");
    hit(8'h04); check(lights_out == 8'h14, "44 steps on band 2");
    if (lights_out == 8'h14) seen[M_RISE2]++;

    // 28 on bands 3..1
    select(28);
    hit(8'h08);
    check(lights_out != 8'h00, "28 lit after a band-3 rise");
    if (lights_out != 8'h00) seen[M_RISE321]++;

    // 32 both edges of band 5
    select(32);
    bands(8'h20); check(lights_out == 8'h0F, "32 first half on rise");
    bands(8'h00); check(lights_out == 8'h00, "32 dark on fall");
    bands(8'h20); check(lights_out == 8'hF0, "32 other half on next rise");
    if (lights_out == 8'hF0) seen[M_BOTH5]++;
    bands(8'h00);

    // 29 slow clock
    select(29);
    prev = lights_out; changes = 0;
    repeat (1000) begin
      @(posedge clk); #1;
      if (lights_out != prev) begin changes++; prev = lights_out; end
    end
    check(changes >= 5, "29 changes on the slow clock");
    seen[M_SLOW] += (changes >= 5);

    // 07 timed explode: rest until a hit, then runs back to rest
    select(7);
    repeat (300) @(posedge clk); #1;
    check(lights_out == 8'h80, "07 rests");
    bands(8'h20);
    check(lights_out == 8'hC0, "07 starts on the hit");
    bands(8'h00);
    repeat (64 * 12) @(posedge clk); #1;
    check(lights_out == 8'h80, "07 back at rest");
    if (lights_out == 8'h80) seen[M_TIMED]++;

    // keypad: cancel, arrows and repeat
    key(3); key(12);
    check(pnum == 8'h07, "cancel keeps 07");
    seen[M_CANCEL]++;
    key(10); key(13);
    check(pnum == 8'h08, "UP from State 0 steps the ones digit");
    seen[M_ARROW]++;
    key(11, TICK * 9 + TICK / 2); key(13);
    check(pnum == 8'h06, "held DOWN repeats");
    if (pnum == 8'h06) seen[M_REPEAT]++;

    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(m)); end
      else $display("mechanism %s: %0d", mech_e'(m), seen[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
