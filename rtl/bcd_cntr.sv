// bcd_cntr: one decade of a synchronous BCD (0..9) counter.
//
// On a rising clk edge the count q = {Q8,Q4,Q2,Q1} is cleared to 0 when clr
// is 1, otherwise advances by one when ce is 1, going from 9 back to 0.
// tc (terminal count) is 1 while the count is 9 and ce is 1, i.e. in the
// cycle that will wrap the decade, so that tc can drive the ce of the next
// decade directly. The port list follows the counter symbol of the original
// schematic (CLK, CE, CLR, TC, Q8..Q1); that clr is synchronous and has
// priority over ce, and that tc is gated by ce, are this design's choices.
// After power-up the count is whatever clr next sets it to; the frequency
// counter clears it in its IDLE state.
module bcd_cntr
  import freqcnt_pkg::*;
(
  input  logic clk,
  input  logic ce,
  input  logic clr,
  output bcd_t q,
  output logic tc
);

  always_ff @(posedge clk) begin
    if (clr)          q <= '0;
    else if (ce)      q <= (q >= bcd_t'(9)) ? '0 : q + 1'b1;
  end

  assign tc = ce & (q == bcd_t'(9));

endmodule
