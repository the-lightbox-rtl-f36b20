// key_repeat: keystroke strobes from a held key.
//
// pressed is the level "a key is down" from the scanner. It is sampled only
// at repeat-clock ticks (2^19 clocks apart in the default configuration,
// about 13 ms with a 40 MHz clock), which also rides over contact bounce. The first tick
// that finds the key down gives one keystroke; if the key is still down
// REPEAT_TICKS ticks later another keystroke follows, and so on every
// REPEAT_TICKS ticks, so holding an arrow key keeps stepping. Any tick that
// finds the key up re-arms the unit.
//
// The repeat period of 8 ticks is the original design's; the exact
// press/repeat rule is this design's reading of it. strobe is a one-cycle
// pulse in the cycle of the tick. Synchronous reset.
module key_repeat #(
  parameter int unsigned REPEAT_TICKS = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  input  logic pressed,
  output logic strobe
);
  localparam int unsigned CW = $clog2(REPEAT_TICKS + 1);
  logic [CW-1:0] cnt;   // 0: armed, else ticks since the last keystroke

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      strobe <= 1'b0;
    end else begin
      strobe <= 1'b0;
      if (tick) begin
        if (!pressed) begin
          cnt <= '0;
        end else if (cnt == '0 || cnt == CW'(REPEAT_TICKS)) begin
          strobe <= 1'b1;
          cnt    <= CW'(1);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
