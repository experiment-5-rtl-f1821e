// tb_control_unit: self-checking testbench of the one-hot controller.
//
// A reference model written as an ordinary enumerated state machine follows
// the ASM chart (IDLE -> COUNT on start, COUNT -> WAIT on time_up, WAIT ->
// IDLE when start is released). The testbench first walks the chart with a
// directed sequence, then drives random start/time_up for many cycles and
// compares every output of the controller with the model after each clock.
// It also pulses the asynchronous reset between clock edges and checks that
// the controller is in IDLE at once.
`timescale 1ns/1ps
module tb_control_unit;

  typedef enum logic [1:0] {M_IDLE, M_COUNT, M_WAIT} mstate_e;

  logic clk = 1'b0, reset = 1'b1, start = 1'b0, time_up = 1'b0;
  logic timer_reset, count_clear, count_enable, data_store, idle, count, wait_st;
  int checks = 0, failures = 0;
  mstate_e m = M_IDLE;
  int visits [3] = '{0, 0, 0};

  control_unit dut (.*);

  always #250 clk = ~clk;

  // Reference: next state of the ASM chart
  function automatic mstate_e next_state(mstate_e s, logic st, logic tu);
    case (s)
      M_IDLE:  return st ? M_COUNT : M_IDLE;
      M_COUNT: return tu ? M_WAIT  : M_COUNT;
      default: return st ? M_WAIT  : M_IDLE;
    endcase
  endfunction

  task automatic compare(string tag);
    logic [6:0] exp, got;
    exp = {m == M_IDLE, m == M_IDLE, m == M_COUNT, m == M_WAIT,
           m == M_IDLE, m == M_COUNT, m == M_WAIT};
    got = {timer_reset, count_clear, count_enable, data_store, idle, count, wait_st};
    checks++;
    if (exp !== got) begin
      failures++;
      $display("FAIL %s at %0t: state %s expected %b got %b", tag, $time, m.name(), exp, got);
    end
  endtask

  // One clock: apply inputs at the falling edge, advance the model at the rising edge
  task automatic step(logic st, logic tu);
    @(negedge clk);
    start = st; time_up = tu;
    @(posedge clk);
    m = next_state(m, st, tu);
    visits[m]++;
    #1 compare("step");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 1'b0;
    #1 compare("after reset");
    // Directed walk: stay in IDLE, start, count, time up, hold, release
    step(0, 0); step(0, 1);            // time_up ignored in IDLE
    step(1, 0);                        // -> COUNT
    step(0, 0); step(1, 0); step(0, 0);// start ignored in COUNT
    step(0, 1);                        // -> WAIT
    step(1, 0); step(1, 1);            // held: stay in WAIT
    step(0, 0);                        // released -> IDLE
    step(1, 0); step(0, 1);            // short press: COUNT then WAIT
    step(0, 0);                        // -> IDLE at once
    // Random stimulus
    for (int i = 0; i < 5000; i++) step(1'($urandom), 1'(($urandom % 4) == 0));
    // Asynchronous reset between clock edges, from COUNT
    while (m != M_COUNT) step(1, 0);
    @(negedge clk); start = 1'b0; #50 reset = 1'b1; #10;
    m = M_IDLE;
    compare("async reset");
    #50 reset = 1'b0;
    step(0, 0);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL: state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
