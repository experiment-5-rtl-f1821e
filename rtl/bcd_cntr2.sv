// bcd_cntr2: two-digit BCD counter, 00..99, built from two bcd_cntr decades.
//
// The units decade counts when ce is 1; its terminal count drives the
// tens decade's ce, so the tens digit advances in the same clock edge at
// which the units digit wraps from 9 to 0. After 99 the counter wraps to
// 00, and tc is 1 in the cycle that makes that wrap. clr (COUNT_CLEAR)
// clears both decades at the next clock edge. The original gives the counter as
// two cascaded decade counters; the carry wiring is this design's choice.
module bcd_cntr2
  import freqcnt_pkg::*;
(
  input  logic clk,
  input  logic ce,
  input  logic clr,
  output bcd_t tens,
  output bcd_t ones,
  output logic tc
);

  logic carry;

  bcd_cntr u_ones (.clk(clk), .ce(ce),    .clr(clr), .q(ones), .tc(carry));
  bcd_cntr u_tens (.clk(clk), .ce(carry), .clr(clr), .q(tens), .tc(tc));

endmodule
