// bcd_7seg: BCD to 7-segment decoder.
//
// Purely combinational. The 4-bit digit d = {D3,D2,D1,D0} selects the
// segment pattern seg = {G,F,E,D,C,B,A}; a 1 lights the segment. Inputs
// 10..15 are not BCD and blank the display. The original design only names this
// decoder (it comes from an earlier exercise); the segment patterns, the
// active-high polarity and the blanking of non-BCD codes are this design's
// choices. Invert seg outside for a common-anode display.
module bcd_7seg
  import freqcnt_pkg::*;
(
  input  bcd_t  d,
  output seg7_t seg
);

  always_comb begin
    unique case (d)
      4'd0:    seg = SEG_0;
      4'd1:    seg = SEG_1;
      4'd2:    seg = SEG_2;
      4'd3:    seg = SEG_3;
      4'd4:    seg = SEG_4;
      4'd5:    seg = SEG_5;
      4'd6:    seg = SEG_6;
      4'd7:    seg = SEG_7;
      4'd8:    seg = SEG_8;
      4'd9:    seg = SEG_9;
      default: seg = SEG_BLANK;
    endcase
  end

endmodule
