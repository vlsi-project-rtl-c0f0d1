// sevenseg: hex digit to seven-segment decoder.
//
// segs is ordered G..A: bit 0 is segment A (top bar), then B (top right),
// C (bottom right), D (bottom), E (bottom left), F (top left) and bit 6 is
// G (middle bar). All sixteen hex values have a glyph (A, b, c, d, E, F
// above 9), although the stopwatch only ever shows 0..9. With ACTIVE_LOW
// set (the default, as in the original decoder) a lit segment is driven
// 0; with ACTIVE_LOW clear a lit segment is driven 1, which is what a
// common-cathode display driven straight from the pins needs. The
// original text calls its inverted patterns common-cathode controls, hence
// the parameter. Combinational.
module sevenseg
  import stopwatch_pkg::*;
#(
  parameter bit ACTIVE_LOW = 1'b1
) (
  input  digit_t s,
  output segs_t  segs
);

  segs_t lit;   // 1 = segment on

  always_comb begin
    unique case (s)
      4'h0: lit = 7'b0111111;
      4'h1: lit = 7'b0000110;
      4'h2: lit = 7'b1011011;
      4'h3: lit = 7'b1001111;
      4'h4: lit = 7'b1100110;
      4'h5: lit = 7'b1101101;
      4'h6: lit = 7'b1111101;
      4'h7: lit = 7'b0000111;
      4'h8: lit = 7'b1111111;
      4'h9: lit = 7'b1100111;
      4'hA: lit = 7'b1110111;
      4'hB: lit = 7'b1111100;
      4'hC: lit = 7'b1011000;
      4'hD: lit = 7'b1011110;
      4'hE: lit = 7'b1111001;
      4'hF: lit = 7'b1110001;
      default: lit = 7'b0000001;
    endcase
  end

  assign segs = ACTIVE_LOW ? ~lit : lit;

endmodule
