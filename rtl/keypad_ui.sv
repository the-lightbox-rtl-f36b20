// keypad_ui: user-input subsystem of the LightBox.
//
// The user types the number (00-99) of the light sequence on a 4x4 keypad
// and sees it on a two-digit seven-segment display. A free-running counter
// provides the time bases, as rising edges of its bits:
//   SCAN_BIT   keypad column step          (2^7 clocks per half period)
//   REPEAT_BIT keystroke sampling / repeat (2^18)
//   MUX_BIT    display digit multiplex     (2^8, in display_mux)
//   BLINK_BIT  blink of the edited digit   (2^26)
// keypad_scanner finds the held key, key_repeat turns it into keystrokes,
// digit_entry runs the entry state machine, display_mux shows the displayed
// (temporary) digits and digit_blink flashes the one being edited.
// pnum = {tens_digit, ones_digit} is the confirmed sequence number in BCD.
// The bit positions are the original design's. Synchronous reset.
module keypad_ui
  import lightbox_pkg::*;
#(
  parameter int unsigned SCAN_BIT   = 7,
  parameter int unsigned REPEAT_BIT = 18,
  parameter int unsigned MUX_BIT    = 8,
  parameter int unsigned BLINK_BIT  = 26
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] rows,
  output logic [3:0] columns,
  output logic [6:0] ssout,
  output logic [1:0] ssvdds,
  output logic [7:0] pnum
);
  localparam int unsigned CW = BLINK_BIT + 1;

  logic [CW-1:0] cnt;
  logic          scan_q, rep_q, scan_tick, rep_tick;
  logic          pressed, strobe, inprogress, digselect;
  key_e          key;
  logic [3:0]    tens_digit, ones_digit, tens_temp, ones_temp;
  logic [1:0]    ssvdds_before;

  free_counter #(.WIDTH(CW)) u_cnt (.clk(clk), .rst(rst), .q(cnt));

  always_ff @(posedge clk) begin
    if (rst) begin
      scan_q <= 1'b0;
      rep_q  <= 1'b0;
    end else begin
      scan_q <= cnt[SCAN_BIT];
      rep_q  <= cnt[REPEAT_BIT];
    end
  end
  assign scan_tick = cnt[SCAN_BIT] & ~scan_q;
  assign rep_tick  = cnt[REPEAT_BIT] & ~rep_q;

  keypad_scanner u_scan (
    .clk(clk), .rst(rst), .tick(scan_tick), .rows(rows),
    .columns(columns), .pressed(pressed), .key(key)
  );

  key_repeat u_rep (
    .clk(clk), .rst(rst), .tick(rep_tick), .pressed(pressed), .strobe(strobe)
  );

  // The key code is held steady while the key is down, so it is still valid
  // in the cycle after the tick, when strobe is high.
  digit_entry u_entry (
    .clk(clk), .rst(rst), .key_valid(strobe), .key(key),
    .tens_digit(tens_digit), .ones_digit(ones_digit),
    .tens_temp(tens_temp), .ones_temp(ones_temp),
    .inprogress(inprogress), .digselect(digselect)
  );

  display_mux #(.MUX_BIT(MUX_BIT)) u_disp (
    .clk(clk), .rst(rst), .tens(tens_temp), .ones(ones_temp),
    .ssout(ssout), .ssvdds(ssvdds_before)
  );

  digit_blink u_blink (
    .ssvdds_before(ssvdds_before), .blink(cnt[BLINK_BIT]),
    .inprogress(inprogress), .digselect(digselect), .ssvdds(ssvdds)
  );

  assign pnum = {tens_digit, ones_digit};
endmodule
