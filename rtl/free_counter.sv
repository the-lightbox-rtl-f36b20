// free_counter: free-running binary up-counter.
//
// Its bits are the slow time bases of the LightBox: the keypad scan step,
// the key repeat clock, the display multiplex, the digit blink, the slow
// light clock, and (low bits, sampled at an audio cue) the random source.
// The design uses rising edges of these bits as clock enables rather than as
// clocks. Synchronous active-high reset clears the count; q advances by one
// every clock.
module free_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= q + 1'b1;
  end
endmodule
