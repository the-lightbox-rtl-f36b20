// light_cue: audio cue detection for the light sequences.
//
// The band bits (ChannelIn) come from a separate processor and are not
// related to clk, so they pass a two-flop synchroniser (ch_sync). Edges are
// then found against a third registered copy:
//   rise5 / fall5  band 5 rose / fell
//   rise2          band 2 rose
//   rise321        at least one of bands 3, 2, 1 rose
// slow_tick marks a rising edge of the slow clock bit (bit 24 of the
// free-running counter in the default configuration, about 0.84 s at
// 40 MHz). Every output is a registered level or a one-cycle strobe, three
// clocks after the band changes. Synchronous reset clears all history.
module light_cue (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] channel_in,
  input  logic       slow,
  output logic [7:0] ch_sync,
  output logic       rise5,
  output logic       fall5,
  output logic       rise2,
  output logic       rise321,
  output logic       slow_tick
);
  logic [7:0] ch_m, ch_q;
  logic       slow_q;
  logic [7:0] rose;

  always_ff @(posedge clk) begin
    if (rst) begin
      ch_m    <= '0;
      ch_sync <= '0;
      ch_q    <= '0;
      slow_q  <= 1'b0;
    end else begin
      ch_m    <= channel_in;
      ch_sync <= ch_m;
      ch_q    <= ch_sync;
      slow_q  <= slow;
    end
  end

  assign rose      = ch_sync & ~ch_q;
  assign rise5     = rose[5];
  assign fall5     = ~ch_sync[5] & ch_q[5];
  assign rise2     = rose[2];
  assign rise321   = |rose[3:1];
  assign slow_tick = slow & ~slow_q;
endmodule
