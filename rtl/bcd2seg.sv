// Seven-segment decoder for one digit.
//
// Maps a 4-bit value to the segment pattern of a common-anode display:
// 0-9 as decimal digits and 10-15 as the hex letters A, b, c, d, E, F.
// The output is bit 7..0 = segments a, b, c, d, e, f, g and the decimal
// point, active low; the decimal point is never lit. Combinational.
// The glyph set and the bit order are those of the reference design
// (its 7 lights only a, b, c; its 9 lights the bottom segment d).
module bcd2seg
  import stopwatch_pkg::*;
(
  input  logic [3:0] bcd_in,
  output seg_t       display
);

  logic [6:0] lit;   // segments a..g, '1' = lit

  always_comb begin
    unique case (bcd_in)
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
      4'hC: lit = 7'b0001101;
      4'hD: lit = 7'b0111101;
      4'hE: lit = 7'b1001111;
      4'hF: lit = 7'b1000111;
    endcase
    display = {~lit, 1'b1};
  end

endmodule
