// Full-size testbench of lightbox_top at its default parameters (keypad
// sampled every 2^19 clocks, display multiplexed on counter bit 8). One
// complete operation: after reset the lights follow the thresholded bands
// (sequence 00); the user then types 1, RIGHT, 0, CONFIRM, and the lights
// chase right on each band-5 hit of the audio.
module tb_lightbox_full;
  logic clk = 0, rst = 1;
  logic [9:0] sample [8];
  logic sample_valid = 0;
  logic [3:0] rows, columns, mkey = 0;
  logic down = 0;
  logic [1:0] ssvdds;
  logic [6:0] ssout;
  logic [7:0] lights_out, channel_in, pnum;
  int checks = 0, failures = 0;
  localparam int TICK = 1 << 19;

  lightbox_top dut (
    .clk(clk), .rst(rst), .sample(sample), .sample_valid(sample_valid), .rows(rows),
    .columns(columns), .ssvdds(ssvdds), .ssout(ssout), .lights_out(lights_out),
    .channel_in(channel_in), .pnum(pnum));
  keypad_model kp (.columns(columns), .down(down), .key(mkey), .rows(rows));
  always #5 clk = ~clk;

  initial begin
    repeat (12 * TICK) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (lights=%h ch=%h pnum=%h)", msg, lights_out, channel_in, pnum); end
  endtask

  task automatic key(int k);
    @(posedge clk); mkey <= 4'(k); down <= 1;
    repeat (TICK * 3 / 2) @(posedge clk);
    down <= 0;
    repeat (TICK) @(posedge clk);
  endtask

  // one set of samples in which exactly the bands of m are loud
  task automatic bands(logic [7:0] m);
    @(posedge clk);
    for (int i = 0; i < 8; i++) sample[i] <= m[i] ? 10'd700 : 10'd0;
    sample_valid <= 1;
    @(posedge clk); sample_valid <= 0;
    repeat (8) @(posedge clk); #1;
    check(channel_in == m, $sformatf("bands %h thresholded", m));
  endtask

  initial begin
    for (int i = 0; i < 8; i++) sample[i] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (10) @(posedge clk);
    check(pnum == 8'h00, "starts on sequence 00");
    for (int i = 0; i < 8; i++) begin
      bands(8'(1 << i) | 8'(1 << ((i + 3) % 8)));
      check(lights_out == channel_in, "00 follows the bands");
    end
    bands(8'h00);

    key(1); key(15); key(0); key(13);
    check(pnum == 8'h10, "sequence 10 selected");
    repeat (10) @(posedge clk); #1;
    check(lights_out == 8'h80, "chase starts on the left");
    for (int i = 1; i <= 9; i++) begin
      bands(8'h20);
      bands(8'h00);
      check(lights_out == 8'(8'h80 >> (i % 8)) || (i % 8 == 0 && lights_out == 8'h80),
            $sformatf("chase step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
