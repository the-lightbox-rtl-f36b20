// Workload testbench: the eight-step voltage ladder used to test the band
// converter (3.3 V down to 0 V in equal steps across channels 0..7), fed as
// 10-bit A/D codes of the measured voltages (5 V reference) into
// lightbox_top at its default parameters. On sequence 00 the lights must
// show the bands whose weighted level is above the weighted average, here
// computed by the testbench; the ladder is also applied reversed.
module tb_voltage_ladder;
  logic clk = 0, rst = 1;
  logic [9:0] sample [8];
  logic sample_valid = 0;
  logic [3:0] rows = 4'hF, columns;
  logic [1:0] ssvdds;
  logic [6:0] ssout;
  logic [7:0] lights_out, channel_in, pnum;
  int checks = 0, failures = 0;
  real volts [8] = '{3.300, 2.792, 2.375, 1.906, 1.392, 0.887, 0.492, 0.010};
  int mult [8] = '{1, 1, 2, 2, 2, 3, 5, 5};

  lightbox_top dut (
    .clk(clk), .rst(rst), .sample(sample), .sample_valid(sample_valid), .rows(rows),
    .columns(columns), .ssvdds(ssvdds), .ssout(ssout), .lights_out(lights_out),
    .channel_in(channel_in), .pnum(pnum));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit reversed);
    int code [8];
    int sum;
    logic [7:0] exp;
    sum = 0;
    for (int i = 0; i < 8; i++) begin
      code[i] = int'(volts[reversed ? 7 - i : i] / 5.0 * 1023.0);
      sum += code[i] * mult[i];
    end
    for (int i = 0; i < 8; i++) exp[i] = (code[i] * mult[i] > sum / 8);
    @(posedge clk);
    for (int i = 0; i < 8; i++) sample[i] <= 10'(code[i]);
    sample_valid <= 1;
    @(posedge clk); sample_valid <= 0;
    repeat (8) @(posedge clk); #1;
    checks++;
    if (channel_in !== exp || lights_out !== exp) begin
      failures++;
      $display("FAIL ladder reversed=%0d ch=%b lights=%b exp=%b", reversed, channel_in, lights_out, exp);
    end else
      $display("ladder reversed=%0d: bands %b lit", reversed, lights_out);
  endtask

  initial begin
    for (int i = 0; i < 8; i++) sample[i] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
