// light_sequencer: the light sequence bank of the LightBox.
//
// Holds the state of the selected sequence and advances it on that
// sequence's audio cue. The state is a step counter, a stored random
// pattern and a three-deep history of random light numbers; light_pattern
// turns the state into lights and says which cue applies, light_cue finds
// the cues. Advance rules per cue type:
//   DIRECT   no state, the lights follow the bands
//   RISE5/RISE2/RISE321/SLOW   one step per event
//   BOTH5    a band-5 rise takes an even step to the next (odd) one, a fall
//            takes an odd step on, so odd steps are "band 5 high"
//   TIMED    at a rest step only a band-5 rise moves on; elsewhere the slow
//            clock does
// An advance also loads the new random pattern/history. Random numbers come
// from a 16-bit maximal-length LFSR stepped every clock and caught at the
// moment of the cue. (Low counter bits would also look random at audio
// cues, but at a slow-clock tick they are always zero.)
// Selecting another number restarts at step 0 with a dark random pattern.
// The original design spreads this state over one register per cue; a single
// state with a cue selector is this design's choice.
//
// Timing: lights is registered; a cue moves the lights 4 clocks after the
// band edge (3 for synchronising and edge detection, 1 for the step), direct
// sequences follow the bands 3 clocks later. Synchronous reset.
module light_sequencer
  import lightbox_pkg::*;
#(
  parameter int unsigned SLOW_BIT = 24,
  parameter int unsigned CNT_W    = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] channel_in,
  input  logic [7:0] pnum,
  output logic [7:0] lights
);
  logic [CNT_W-1:0]  cnt;
  logic [7:0]        ch_sync, rnd, rnd_next, pat;
  logic [8:0]        hist, hist_next;
  logic [STEP_W-1:0] step;
  logic [7:0]        pnum_q;
  logic [15:0]       lfsr;
  logic [5:0]        len;
  logic              rest, adv;
  logic              rise5, fall5, rise2, rise321, slow_tick;
  cue_e              cue;

  free_counter #(.WIDTH(CNT_W)) u_cnt (.clk(clk), .rst(rst), .q(cnt));

  light_cue u_cue (
    .clk(clk), .rst(rst), .channel_in(channel_in), .slow(cnt[SLOW_BIT]),
    .ch_sync(ch_sync), .rise5(rise5), .fall5(fall5), .rise2(rise2),
    .rise321(rise321), .slow_tick(slow_tick)
  );

  light_pattern u_pat (
    .pnum(pnum), .step(step), .rnd(rnd), .hist(hist), .r(lfsr[8:0]),
    .ch(ch_sync), .lights(pat), .cue(cue), .len(len), .rest(rest),
    .rnd_next(rnd_next), .hist_next(hist_next)
  );

  // x^16 + x^14 + x^13 + x^11 + 1, Fibonacci form
  always_ff @(posedge clk) begin
    if (rst) lfsr <= 16'hACE1;
    else     lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_comb begin
    unique case (cue)
      CUE_RISE5:   adv = rise5;
      CUE_RISE2:   adv = rise2;
      CUE_RISE321: adv = rise321;
      CUE_BOTH5:   adv = step[0] ? fall5 : rise5;
      CUE_SLOW:    adv = slow_tick;
      CUE_TIMED:   adv = rest ? rise5 : slow_tick;
      default:     adv = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      step   <= '0;
      rnd    <= '0;
      hist   <= '0;
      pnum_q <= '0;
      lights <= '0;
    end else begin
      pnum_q <= pnum;
      lights <= pat;
      if (pnum != pnum_q) begin
        step <= '0;
        rnd  <= '0;
        hist <= '0;
      end else if (adv) begin
        step <= (6'(step) + 6'd1 >= len) ? '0 : step + 1'b1;
        rnd  <= rnd_next;
        hist <= hist_next;
      end
    end
  end
endmodule
