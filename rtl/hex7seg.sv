// hex7seg: hexadecimal digit to seven-segment pattern.
//
// Combinational. Output bit i drives segment i (0 = a ... 6 = g) of a
// common-anode display, so a segment lights when its bit is 0, as on the
// DE1-SoC board. Digits A-F are shown as A, b, C, d, E, F.
// The use of the board's hex displays follows the document; the glyphs
// (a 9 with its bottom segment lit, for instance) are this design's choice.
module hex7seg (
  input  logic [3:0] digit,
  output logic [6:0] seg_n
);

  logic [6:0] seg;   // active high, bit 0 = segment a

  always_comb begin
    unique case (digit)
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      default: seg = 7'b1110001;   // F
    endcase
    seg_n = ~seg;
  end

endmodule
