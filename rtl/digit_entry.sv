// digit_entry: two-digit entry state machine of the LightBox keypad.
//
// The user picks a light sequence 00-99. Two pairs of 4-bit registers hold
// the digits: the active pair (tens_digit, ones_digit), which selects the
// sequence, and the displayed pair (tens_temp, ones_temp), which is being
// edited. Three states:
//   IDLE  (State 0) display shows the active number.
//   TENS  (State 1) tens digit is edited.
//   ONES  (State 2) ones digit is edited.
// Keys: a digit, from IDLE or in TENS, sets the tens digit (and enters
// TENS); in ONES it sets the ones digit. UP/DOWN step the edited digit,
// wrapping 9<->0; from IDLE they enter ONES and step the ones digit. LEFT
// goes IDLE->TENS and ONES->TENS; RIGHT goes IDLE->ONES and TENS->ONES.
// CONFIRM copies the displayed digits to the active ones; CANCEL copies the
// active ones back; both return to IDLE.
// The state graph, the register split and the wrap come from the original
// design; digits stay in TENS rather than moving on (its description, not
// its code), and LEFT in TENS and RIGHT in ONES are ignored.
//
// Interface: key_valid is a one-cycle keystroke strobe with key its code.
// inprogress = not IDLE; digselect = 1 for TENS, 0 for ONES (held in IDLE).
// All outputs are registered and change the cycle after the keystroke.
// Reset: IDLE, all digits 0.
module digit_entry
  import lightbox_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       key_valid,
  input  key_e       key,
  output logic [3:0] tens_digit,
  output logic [3:0] ones_digit,
  output logic [3:0] tens_temp,
  output logic [3:0] ones_temp,
  output logic       inprogress,
  output logic       digselect
);
  typedef enum logic [1:0] {IDLE, TENS, ONES} entry_e;
  entry_e state;

  function automatic logic [3:0] inc9(input logic [3:0] d);
    return (d >= 4'd9) ? 4'd0 : d + 4'd1;
  endfunction
  function automatic logic [3:0] dec9(input logic [3:0] d);
    return (d == 4'd0 || d > 4'd9) ? 4'd9 : d - 4'd1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      digselect  <= 1'b1;
      tens_digit <= '0;
      ones_digit <= '0;
      tens_temp  <= '0;
      ones_temp  <= '0;
    end else if (key_valid) begin
      unique case (key)
        KEY_CONFIRM: begin
          tens_digit <= tens_temp;
          ones_digit <= ones_temp;
          state      <= IDLE;
        end
        KEY_CANCEL: begin
          tens_temp <= tens_digit;
          ones_temp <= ones_digit;
          state     <= IDLE;
        end
        KEY_UP, KEY_DOWN: begin
          if (state == TENS)
            tens_temp <= (key == KEY_UP) ? inc9(tens_temp) : dec9(tens_temp);
          else begin
            ones_temp <= (key == KEY_UP) ? inc9(ones_temp) : dec9(ones_temp);
            state     <= ONES;
            digselect <= 1'b0;
          end
        end
        KEY_LEFT: begin
          if (state != TENS) begin
            state     <= TENS;
            digselect <= 1'b1;
          end
        end
        KEY_RIGHT: begin
          if (state != ONES) begin
            state     <= ONES;
            digselect <= 1'b0;
          end
        end
        default: begin  // a digit 0-9
          if (state == ONES)
            ones_temp <= key;
          else begin
            tens_temp <= key;
            state     <= TENS;
            digselect <= 1'b1;
          end
        end
      endcase
    end
  end

  assign inprogress = (state != IDLE);
endmodule
