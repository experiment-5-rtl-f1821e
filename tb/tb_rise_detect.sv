// tb_rise_detect: self-checking testbench of the 0->1 transition detector.
//
// Random input, changed at the falling clock edge as a synchronized signal
// would be. The expected pulse is worked out from the testbench's own record
// of the input at the previous rising edge; the number of pulses must equal
// the number of 0->1 transitions the testbench made.
`timescale 1ns/1ps
module tb_rise_detect;

  logic clk = 1'b0, reset = 1'b1, sig = 1'b0, pulse;
  logic prev = 1'b0;
  int checks = 0, failures = 0, rises = 0;

  rise_detect dut (.*);

  always #250 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      sig = (i < 20) ? 1'(i % 2) : 1'($urandom);
      if (sig && !prev) rises++;
      #1;
      checks++;
      if (pulse !== (sig & ~prev)) begin
        failures++;
        $display("FAIL cycle %0d: sig %b prev %b pulse %b", i, sig, prev, pulse);
      end
      @(posedge clk);
      #1;   // pulse still high here would be a pulse longer than one clock
      prev = sig;
      if (pulse) begin
        failures++;
        $display("FAIL cycle %0d: pulse longer than one clock", i);
      end
    end
    checks++;
    if (rises == 0) begin failures++; $display("FAIL: no transitions made"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
