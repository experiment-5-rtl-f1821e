// div2000: divide-by-N counter (N = 2000) with synchronous reset input; its
// terminal count is TIME_UP, the end of the frequency counter's 1 ms gate.
//
// A count16 counts 0, 1, ..., N-1. The terminal count tc is the AND of the
// counter bits that are 1 in N-1 (for N = 2000, N-1 = 1999 = bits 10, 9, 8,
// 7, 6, 3, 2, 1, 0); counting up from 0, the first value with all of them
// set is N-1 itself, so only those bits need decoding. tc is ORed with the
// external reset into count16's synchronous reset, so the count returns to
// 0 after N-1 and the counter divides by N. This is the structure of the
// original divide-by-2000 schematic with N as a parameter, which is this
// design's own addition.
//
// Timing: after reset is released with the count at 0, tc is 1 for one
// cycle every N cycles, first in the N-th cycle. N must be 2..65536.
module div2000 #(
  parameter int unsigned N = 2000
) (
  input  logic clk,
  input  logic reset,
  output logic tc
);

  localparam logic [15:0] LAST = 16'(N - 1);   // bits that the AND decodes

  logic [15:0] q;

  count16 u_count16 (.clk(clk), .reset(reset | tc), .q(q));

  // AND of the counter bits that are set in N-1; the rest are tied high
  assign tc = &(q | ~LAST);

  initial assert (N >= 2 && N <= 65536) else $fatal(1, "div2000: N out of range");

endmodule
