// Testbench for key_decoder: all 256 column/row combinations against the
// keypad layout written out as text.
module tb_key_decoder;
  import lightbox_pkg::*;
  logic [3:0] columns, rows;
  key_e key;
  logic valid;
  int checks = 0, failures = 0;
  // Layout, top row first; u=UP d=DOWN x=CANCEL v=CONFIRM l=LEFT r=RIGHT.
  string layout [4] = '{"123u", "456d", "789x", "l0rv"};

  function automatic int code(byte ch);
    case (ch)
      "u": return 10; "d": return 11; "x": return 12; "v": return 13;
      "l": return 14; "r": return 15;
      default: return ch - "0";
    endcase
  endfunction

  key_decoder dut (.columns(columns), .rows(rows), .key(key), .valid(valid));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++)
      for (int r = 0; r < 16; r++) begin
        int nc, nr, ci, ri;
        bit exp_valid;
        columns = 4'(c);
        rows    = 4'(r);
        nc = 0; nr = 0; ci = 0; ri = 0;
        for (int k = 0; k < 4; k++) begin
          if (!columns[k]) begin nc++; ci = k; end
          if (!rows[k])    begin nr++; ri = k; end
        end
        exp_valid = (nc == 1) && (nr == 1);
        #1;
        checks++;
        if (valid !== exp_valid || (exp_valid && int'(key) != code(layout[ri][ci]))) begin
          failures++;
          $display("FAIL col=%b row=%b valid=%b key=%0d", columns, rows, valid, key);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
