// display_mux: drives a dual common-anode seven-segment display.
//
// Both digits share one segment bus. A counter of MUX_BIT+1 bits runs
// freely; its top bit picks the digit: while it is 0 the tens digit is
// decoded and its enable ssvdds[1] is low (on), ssvdds[0] high (off); while
// it is 1 the ones digit is shown. With MUX_BIT = 8 each digit is lit for
// 256 clocks in turn, fast enough not to flicker. Enables are active low
// because a high enable turns a common-anode digit off. The bit position is
// the original design's; the counter is local. Synchronous reset.
module display_mux #(
  parameter int unsigned MUX_BIT = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] tens,
  input  logic [3:0] ones,
  output logic [6:0] ssout,
  output logic [1:0] ssvdds
);
  logic [MUX_BIT:0] cnt;
  logic             sel;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign sel    = cnt[MUX_BIT];
  assign ssvdds = {sel, ~sel};

  seven_seg u_seg (
    .s  (sel ? ones : tens),
    .seg(ssout)
  );
endmodule
