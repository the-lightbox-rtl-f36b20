// key_decoder: keypad column/row pair to key code.
//
// The 4x4 keypad is scanned with one column driven low; a pressed key pulls
// its row low. Layout, top row first:
//     1  2  3  UP
//     4  5  6  DOWN
//     7  8  9  CANCEL
//   LEFT 0 RIGHT CONFIRM
// columns[0] is the left column and rows[0] the top row. valid is high only
// when exactly one column and exactly one row are low; key is then the code
// from lightbox_pkg::key_e (digits 0-9, UP 10, DOWN 11, CANCEL 12,
// CONFIRM 13, LEFT 14, RIGHT 15), else KEY_0. Combinational.
module key_decoder
  import lightbox_pkg::*;
(
  input  logic [3:0] columns,
  input  logic [3:0] rows,
  output key_e       key,
  output logic       valid
);
  // Key map indexed [row][column].
  localparam key_e MAP [4][4] = '{
    '{KEY_1,    KEY_2, KEY_3,     KEY_UP},
    '{KEY_4,    KEY_5, KEY_6,     KEY_DOWN},
    '{KEY_7,    KEY_8, KEY_9,     KEY_CANCEL},
    '{KEY_LEFT, KEY_0, KEY_RIGHT, KEY_CONFIRM}
  };

  function automatic logic one_low(input logic [3:0] v, output logic [1:0] idx);
    idx = 2'd0;
    unique case (v)
      4'b1110: begin idx = 2'd0; return 1'b1; end
      4'b1101: begin idx = 2'd1; return 1'b1; end
      4'b1011: begin idx = 2'd2; return 1'b1; end
      4'b0111: begin idx = 2'd3; return 1'b1; end
      default: return 1'b0;
    endcase
  endfunction

  always_comb begin
    logic [1:0] c, r;
    logic       cv, rv;
    cv    = one_low(columns, c);
    rv    = one_low(rows, r);
    valid = cv && rv;
    key   = valid ? MAP[r][c] : KEY_0;
  end
endmodule
