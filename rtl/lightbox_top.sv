// lightbox_top: digital part of the LightBox audio-driven light controller.
//
// Eight band-pass-filtered and rectified audio levels arrive as A/D samples.
// band_threshold marks the bands above the weighted average (ChannelIn);
// light_sequencer plays the light sequence the user selected, stepping it on
// audio cues taken from those bands; keypad_ui lets the user pick the
// sequence number 00-99 on a 4x4 keypad and shows it on a two-digit display.
// The analog front end and the converter are outside this module: their
// result enters on sample/sample_valid.
//
// Parameters are bit positions of free-running counters (see keypad_ui and
// light_sequencer) and the sample width; their defaults are those of the
// original design. All logic runs on clk with a synchronous, active-high
// reset; the asynchronous inputs (rows, the band bits) are synchronised
// inside. The lights of a direct sequence change three clock edges after
// the edge that takes sample_valid. The threshold block's out_valid is left unconnected: the band
// bits are levels that the sequencer samples every clock, as the original
// design's PIC port was.
module lightbox_top #(
  parameter int unsigned SCAN_BIT   = 7,
  parameter int unsigned REPEAT_BIT = 18,
  parameter int unsigned MUX_BIT    = 8,
  parameter int unsigned BLINK_BIT  = 26,
  parameter int unsigned SLOW_BIT   = 24,
  parameter int unsigned SAMPLE_W   = 10
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] sample [8],
  input  logic                sample_valid,
  input  logic [3:0]          rows,
  output logic [3:0]          columns,
  output logic [1:0]          ssvdds,
  output logic [6:0]          ssout,
  output logic [7:0]          lights_out,
  output logic [7:0]          channel_in,
  output logic [7:0]          pnum
);
  logic th_valid;

  band_threshold #(.N(8), .SAMPLE_W(SAMPLE_W)) u_thresh (
    .clk(clk), .rst(rst), .sample(sample), .sample_valid(sample_valid),
    .channel_in(channel_in), .out_valid(th_valid)
  );

  light_sequencer #(.SLOW_BIT(SLOW_BIT), .CNT_W(32)) u_seq (
    .clk(clk), .rst(rst), .channel_in(channel_in), .pnum(pnum),
    .lights(lights_out)
  );

  keypad_ui #(
    .SCAN_BIT(SCAN_BIT), .REPEAT_BIT(REPEAT_BIT),
    .MUX_BIT(MUX_BIT), .BLINK_BIT(BLINK_BIT)
  ) u_ui (
    .clk(clk), .rst(rst), .rows(rows), .columns(columns),
    .ssout(ssout), .ssvdds(ssvdds), .pnum(pnum)
  );
endmodule
