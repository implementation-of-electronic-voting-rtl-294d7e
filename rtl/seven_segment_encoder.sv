// seven_segment_encoder: turns one display glyph into the segment pattern
// of a common-cathode seven-segment digit.
//
// Output bit 6 drives segment a and bit 0 segment g; a 1 lights the segment.
// The patterns for 1-9 and for the letter E are the ones the original
// design drives onto its display outputs; the pattern for 0 (all but g) and
// the blank glyph are the usual ones and were chosen here. Glyph codes
// 10-13, which nothing produces, are shown blank. Purely combinational.
module seven_segment_encoder
  import evm_pkg::*;
(
  input  glyph_t glyph,
  output seg_t   seg
);

  always_comb begin
    unique case (glyph)
      4'd0:    seg = 7'b1111110;
      4'd1:    seg = 7'b0110000;
      4'd2:    seg = 7'b1101101;
      4'd3:    seg = 7'b1111001;
      4'd4:    seg = 7'b0110011;
      4'd5:    seg = 7'b1011011;
      4'd6:    seg = 7'b1011111;
      4'd7:    seg = 7'b1110000;
      4'd8:    seg = 7'b1111111;
      4'd9:    seg = 7'b1111011;
      GLYPH_E: seg = 7'b1001111;
      default: seg = 7'b0000000;
    endcase
  end

endmodule
