// control_unit: one flip-flop per state (one-hot) controller of the
// frequency counter.
//
// Three state flip-flops, IDLE, COUNT and WAIT; exactly one holds a 1. Each
// D input is "stay here and the exit condition is false" OR "the previous
// state is active and its exit condition is true":
//   D_IDLE  = IDLE  & ~start   | WAIT  & ~start
//   D_COUNT = IDLE  &  start   | COUNT & ~time_up
//   D_WAIT  = COUNT &  time_up | WAIT  &  start
// The outputs are Moore outputs taken straight from the state flip-flops:
//   timer_reset = count_clear = IDLE, count_enable = COUNT, data_store = WAIT.
// State transitions and outputs follow the original state chart. reset is
// active high and asynchronous: it presets the IDLE flip-flop and clears
// the other two, using the flip-flops' set/clear inputs as the original suggests;
// the choice of asynchronous over synchronous reset is this design's own.
//
// Interface: start must already be synchronized to clk (START_S); time_up
// is the divide-by-2000 counter's terminal count. All outputs change only
// right after a rising clk edge.
module control_unit
  import freqcnt_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  logic time_up,
  output logic timer_reset,
  output logic count_clear,
  output logic count_enable,
  output logic data_store,
  output logic idle,
  output logic count,
  output logic wait_st
);

  state_t q;   // state flip-flops
  state_t d;   // their D inputs

  always_comb begin
    d[IDLE_BIT]  = (q[IDLE_BIT]  & ~start)   | (q[WAIT_BIT]  & ~start);
    d[COUNT_BIT] = (q[IDLE_BIT]  &  start)   | (q[COUNT_BIT] & ~time_up);
    d[WAIT_BIT]  = (q[COUNT_BIT] &  time_up) | (q[WAIT_BIT]  &  start);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) q <= S_IDLE;
    else       q <= d;
  end

  assign idle    = q[IDLE_BIT];
  assign count   = q[COUNT_BIT];
  assign wait_st = q[WAIT_BIT];

  assign timer_reset  = q[IDLE_BIT];
  assign count_clear  = q[IDLE_BIT];
  assign count_enable = q[COUNT_BIT];
  assign data_store   = q[WAIT_BIT];

  // Only one state flip-flop may hold a 1
  a_onehot: assert property (@(posedge clk) disable iff (reset)
                      (q != '0) && ((q & (q - 1'b1)) == '0))
    else $error("control_unit: state is not one-hot: %b", q);

endmodule
