// digit_blink: makes the digit being edited flash.
//
// The display multiplexer produces active-high "off" enables ssvdds_before
// for the two common-anode digits ([1] = tens, [0] = ones). ORing an enable
// with a very slow clock bit blanks that digit for half of each slow period.
// The blanked version is used for the tens digit when inprogress and
// digselect are both high (tens being edited), and for the ones digit when
// inprogress is high and digselect low; otherwise the enables pass unchanged.
// The structure follows the original design's blink circuit exactly.
// Combinational.
module digit_blink (
  input  logic [1:0] ssvdds_before,
  input  logic       blink,
  input  logic       inprogress,
  input  logic       digselect,
  output logic [1:0] ssvdds
);
  logic [1:0] ssvdds_blinking;
  assign ssvdds_blinking = ssvdds_before | {2{blink}};
  assign ssvdds[1] = (inprogress &&  digselect) ? ssvdds_blinking[1] : ssvdds_before[1];
  assign ssvdds[0] = (inprogress && !digselect) ? ssvdds_blinking[0] : ssvdds_before[0];
endmodule
