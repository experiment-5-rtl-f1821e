// freqcnt: gated frequency counter with a one-hot control unit.
//
// The counter measures the frequency of S1_1 by counting its 0->1
// transitions during a fixed gate time. With the 2.000 MHz clock CLK0 and a
// divide-by-2000 timer the gate is 1 ms, so the two-digit result reads
// directly in kHz (a 25 kHz input shows "25").
//
// Data path: S1_1 passes through a synchronizer (SIGNAL_S) and a 0->1
// transition detector; its pulse, ANDed with the controller's COUNT_ENABLE,
// is the clock enable of a two-digit BCD counter. In state WAIT the
// controller's DATA_STORE loads the count into an 8-bit register, whose two
// digits are decoded onto the displays DIS1 (tens) and DIS2 (units). The
// register keeps the reading while the next one is counted.
//
// Control: the push buttons PB1 (Start) and PB4 (Reset) are active low and
// are inverted here. Start is synchronized (START_S) before the controller
// reads it; Reset is used directly as the asynchronous master reset of the
// controller, the synchronizers, the transition detector and the display
// register. The controller stays in IDLE, holding the timer and the BCD
// counter in reset, until Start is pressed; in COUNT the BCD counter is
// enabled until the timer's terminal count TIME_UP, 1 ms later; in WAIT the
// result is stored and the controller waits for Start to be released. The
// LED bar BAR1_1..BAR1_3 shows the IDLE, COUNT and WAIT flip-flops.
//
// The block structure, signal names, pin names, clock rate, timer length and
// controller behaviour follow the original design; which BCD decade feeds which
// display, the segment polarity, the synchronous BCD clear and the
// asynchronous reset of the state flip-flops are this design's choices.
// Counts above 99 wrap, so the display shows the count modulo 100. Inputs
// faster than half the clock (1 MHz) cannot be counted, as the synchronizer
// samples them.
//
// Timing: a measurement takes one clock to synchronize Start, one to leave
// IDLE, TIMER_DIV clocks in COUNT, and one in WAIT to store the result; the
// new reading appears on the displays one clock after WAIT is entered.
module freqcnt
  import freqcnt_pkg::*;
#(
  parameter int unsigned TIMER_DIV   = 2000,   // gate time in clocks
  parameter int unsigned SYNC_STAGES = 1       // flip-flops per synchronizer
) (
  input  logic  CLK0,     // 2.000 MHz master clock
  input  logic  PB1,      // Start, active low
  input  logic  PB4,      // Reset, active low
  input  logic  S1_1,     // external signal to be measured
  output seg7_t DIS1,     // tens digit segments {G,F,E,D,C,B,A}
  output seg7_t DIS2,     // units digit segments {G,F,E,D,C,B,A}
  output logic  BAR1_1,   // IDLE
  output logic  BAR1_2,   // COUNT
  output logic  BAR1_3    // WAIT
);

  logic clock, reset, start, signal_s, start_s;
  logic time_up, timer_reset, count_clear, count_enable, data_store;
  logic edge_pulse, bcd_ce;
  bcd_t tens, ones;
  logic [7:0] stored;

  assign clock = CLK0;
  assign reset = ~PB4;
  assign start = ~PB1;

  synchronizer #(.STAGES(SYNC_STAGES)) u_sync_start (
    .clk(clock), .reset(reset), .async_in(start), .sync_out(start_s)
  );

  synchronizer #(.STAGES(SYNC_STAGES)) u_sync_signal (
    .clk(clock), .reset(reset), .async_in(S1_1), .sync_out(signal_s)
  );

  rise_detect u_rise (
    .clk(clock), .reset(reset), .sig(signal_s), .pulse(edge_pulse)
  );

  control_unit u_ctrl (
    .clk(clock), .reset(reset), .start(start_s), .time_up(time_up),
    .timer_reset(timer_reset), .count_clear(count_clear),
    .count_enable(count_enable), .data_store(data_store),
    .idle(BAR1_1), .count(BAR1_2), .wait_st(BAR1_3)
  );

  div2000 #(.N(TIMER_DIV)) u_timer (
    .clk(clock), .reset(timer_reset), .tc(time_up)
  );

  // Count only transitions that fall inside the gate time
  assign bcd_ce = count_enable & edge_pulse;

  // The carry out of the tens decade (99 -> 00) is left open: the display
  // shows the count modulo 100
  bcd_cntr2 u_bcd (
    .clk(clock), .ce(bcd_ce), .clr(count_clear),
    .tens(tens), .ones(ones), .tc()
  );

  dffe8 u_store (
    .clk(clock), .ena(data_store), .clrn(~reset), .prn(1'b1),
    .d({tens, ones}), .q(stored)
  );

  bcd_7seg u_dec_tens (.d(stored[7:4]), .seg(DIS1));
  bcd_7seg u_dec_ones (.d(stored[3:0]), .seg(DIS2));

endmodule
