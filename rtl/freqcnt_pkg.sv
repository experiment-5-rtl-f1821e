// freqcnt_pkg: types and constants shared by the frequency counter blocks.
//
// The controller is one-hot: state_t is a packed vector with one flip-flop
// per state, and the *_BIT constants name the position of each state's
// flip-flop. bcd_t is one decimal digit, seg7_t the seven segment drives
// in the order {G,F,E,D,C,B,A}. SEG_* are the segment patterns for the
// digits 0-9 with the usual a..g segment naming (a on top, then clockwise,
// g in the middle); these patterns are this design's choice, as the original
// design takes its decoder from elsewhere and does not list it.
package freqcnt_pkg;

  // One-hot controller state: one bit per state
  localparam int unsigned NUM_STATES = 3;
  localparam int unsigned IDLE_BIT   = 0;
  localparam int unsigned COUNT_BIT  = 1;
  localparam int unsigned WAIT_BIT   = 2;
  typedef logic [NUM_STATES-1:0] state_t;

  localparam state_t S_IDLE  = state_t'(1 << IDLE_BIT);
  localparam state_t S_COUNT = state_t'(1 << COUNT_BIT);
  localparam state_t S_WAIT  = state_t'(1 << WAIT_BIT);

  typedef logic [3:0] bcd_t;
  typedef logic [6:0] seg7_t;   // {G,F,E,D,C,B,A}, 1 = segment lit

  // Segment patterns {G,F,E,D,C,B,A} for the digits 0..9
  localparam seg7_t SEG_0 = 7'b0111111;
  localparam seg7_t SEG_1 = 7'b0000110;
  localparam seg7_t SEG_2 = 7'b1011011;
  localparam seg7_t SEG_3 = 7'b1001111;
  localparam seg7_t SEG_4 = 7'b1100110;
  localparam seg7_t SEG_5 = 7'b1101101;
  localparam seg7_t SEG_6 = 7'b1111101;
  localparam seg7_t SEG_7 = 7'b0000111;
  localparam seg7_t SEG_8 = 7'b1111111;
  localparam seg7_t SEG_9 = 7'b1101111;
  localparam seg7_t SEG_BLANK = 7'b0000000;

endpackage
