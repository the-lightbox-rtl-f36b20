// seven_seg: hexadecimal digit to seven-segment pattern.
//
// The LightBox display is common-anode, so a segment is lit by a 0. The
// output order is seg = {a, b, c, d, e, f, g} (seg[6] = a, seg[0] = g), the
// bit order of the original display wiring. Glyphs are the usual hex shapes
// (A, b, C, d, E, F above 9). Purely combinational.
module seven_seg (
  input  logic [3:0] s,
  output logic [6:0] seg
);
  logic [6:0] lit;  // {a..g}, 1 = segment on
  always_comb begin
    unique case (s)
      4'h0: lit = 7'b1111110;
      4'h1: lit = 7'b0110000;
      4'h2: lit = 7'b1101101;
      4'h3: lit = 7'b1111001;
      4'h4: lit = 7'b0110011;
      4'h5: lit = 7'b1011011;
      4'h6: lit = 7'b1011111;
      4'h7: lit = 7'b1110000;
      4'h8: lit = 7'b1111111;
      4'h9: lit = 7'b1111011;
      4'hA: lit = 7'b1110111;
      4'hB: lit = 7'b0011111;
      4'hC: lit = 7'b1001110;
      4'hD: lit = 7'b0111101;
      4'hE: lit = 7'b1001111;
      default: lit = 7'b1000111;  // F
    endcase
  end
  assign seg = ~lit;
endmodule
