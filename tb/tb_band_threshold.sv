// Testbench for band_threshold: random and corner-case sample sets against
// a reference that weights, averages and compares in integer arithmetic;
// also checks the one-clock latency and that the output holds between sets.
module tb_band_threshold;
  logic clk = 0, rst = 1, sample_valid = 0;
  logic [9:0] sample [8];
  logic [7:0] channel_in;
  logic out_valid;
  int checks = 0, failures = 0;
  int mult [8] = '{1, 1, 2, 2, 2, 3, 5, 5};

  band_threshold dut (.clk(clk), .rst(rst), .sample(sample), .sample_valid(sample_valid),
                      .channel_in(channel_in), .out_valid(out_valid));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_hot(int v [8]);
    int sum, avg;
    logic [7:0] h;
    sum = 0;
    for (int i = 0; i < 8; i++) sum += v[i] * mult[i];
    avg = sum / 8;
    for (int i = 0; i < 8; i++) h[i] = (v[i] * mult[i] > avg);
    return h;
  endfunction

  task automatic apply(int v [8]);
    logic [7:0] exp;
    exp = ref_hot(v);
    @(posedge clk);
    for (int i = 0; i < 8; i++) sample[i] <= 10'(v[i]);
    sample_valid <= 1;
    @(posedge clk);
    sample_valid <= 0;
    #1;
    checks++;
    if (!out_valid || channel_in !== exp) begin
      failures++;
      $display("FAIL valid=%b ch=%b exp=%b", out_valid, channel_in, exp);
    end
    // change the inputs without valid: output must hold
    for (int i = 0; i < 8; i++) sample[i] <= 10'($urandom_range(0, 1023));
    repeat (2) @(posedge clk); #1;
    checks++;
    if (channel_in !== exp || out_valid) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    int v [8];
    for (int i = 0; i < 8; i++) sample[i] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    v = '{0, 0, 0, 0, 0, 0, 0, 0};             apply(v);   // all equal: none hot
    v = '{1023, 1023, 1023, 1023, 1023, 1023, 1023, 1023}; apply(v);
    v = '{800, 0, 0, 0, 0, 0, 0, 0};           apply(v);   // single loud bass band
    v = '{100, 100, 100, 100, 100, 100, 100, 100}; apply(v); // weights decide
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 8; i++) v[i] = $urandom_range(0, 1023);
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
