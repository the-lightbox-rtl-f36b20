// keypad_model: behavioural model of the 4x4 matrix keypad, for testbenches.
//
// When down is high, the key with code key (0-9 digits, 10 UP, 11 DOWN,
// 12 CANCEL, 13 CONFIRM, 14 LEFT, 15 RIGHT) connects its row to its column:
// the row reads low while that column is driven low. Rows are pulled up.
module keypad_model (
  input  logic [3:0] columns,
  input  logic       down,
  input  logic [3:0] key,
  output logic [3:0] rows
);
  int r, c;
  always_comb begin
    case (key)
      4'd1: begin r = 0; c = 0; end  4'd2: begin r = 0; c = 1; end
      4'd3: begin r = 0; c = 2; end  4'd10: begin r = 0; c = 3; end
      4'd4: begin r = 1; c = 0; end  4'd5: begin r = 1; c = 1; end
      4'd6: begin r = 1; c = 2; end  4'd11: begin r = 1; c = 3; end
      4'd7: begin r = 2; c = 0; end  4'd8: begin r = 2; c = 1; end
      4'd9: begin r = 2; c = 2; end  4'd12: begin r = 2; c = 3; end
      4'd14: begin r = 3; c = 0; end 4'd0: begin r = 3; c = 1; end
      4'd15: begin r = 3; c = 2; end default: begin r = 3; c = 3; end
    endcase
    rows = 4'hF;
    if (down && !columns[c]) rows[r] = 1'b0;
  end
endmodule
