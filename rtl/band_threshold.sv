// band_threshold: decides which audio bands are "hot".
//
// Eight rectified audio bands (lowest frequency in [0]) arrive as SAMPLE_W
// bit A/D results. Each is multiplied by a fixed per-band weight (MULT, low
// bands weighted less so that bass does not dominate; a noisy band can be
// silenced by lowering its weight), the eight weighted values are summed and
// divided by eight (truncating), and band i is hot when its weighted value
// is strictly above that average. The result is the ChannelIn bus of the
// light sequencer. Weights, average and comparison are the original design's,
// where a microcontroller computes them in software; here they are one
// pipelined logic stage.
//
// Timing: sample_valid is a one-cycle strobe with a complete set of samples;
// channel_in and the out_valid strobe follow one clock later, and channel_in
// holds until the next set. Synchronous reset clears it.
module band_threshold #(
  parameter int unsigned N        = 8,
  parameter int unsigned SAMPLE_W = 10,
  parameter int unsigned MULT_W   = 3,
  parameter logic [MULT_W-1:0] MULT [N] = '{3'd1, 3'd1, 3'd2, 3'd2, 3'd2, 3'd3, 3'd5, 3'd5}
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] sample [N],
  input  logic                sample_valid,
  output logic [N-1:0]        channel_in,
  output logic                out_valid
);
  localparam int unsigned WW = SAMPLE_W + MULT_W;      // weighted value
  localparam int unsigned SW = WW + $clog2(N);         // sum of N of them

  logic [WW-1:0] weighted [N];
  logic [SW-1:0] sum;
  logic [WW-1:0] avg;
  logic [N-1:0]  hot;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) begin
      weighted[i] = WW'(sample[i]) * WW'(MULT[i]);
      sum         = sum + SW'(weighted[i]);
    end
    avg = WW'(sum / SW'(N));
    for (int i = 0; i < N; i++)
      hot[i] = (weighted[i] > avg);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      channel_in <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= sample_valid;
      if (sample_valid) channel_in <= hot;
    end
  end
endmodule
