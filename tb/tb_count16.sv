// tb_count16: self-checking testbench of the 16-bit counter.
//
// The counter is reset, counted through a full 2^16 wrap, and reset again
// at random times; an integer model predicts the value after every edge,
// including that the reset is synchronous (no effect until the clock).
`timescale 1ns/1ps
module tb_count16;

  logic clk = 1'b0, reset = 1'b1;
  logic [15:0] q;
  int checks = 0, failures = 0;
  int unsigned model = 0;
  bit wrapped = 0;

  count16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    checks++;
    if (q !== 16'd0) begin failures++; $display("FAIL: reset gave %0d", q); end
    for (int i = 0; i < 70000; i++) begin
      @(negedge clk);
      reset = (i > 66000) && (($urandom % 300) == 0);
      if (reset) begin
        #1; checks++;
        if (q !== 16'(model)) begin failures++; $display("FAIL: reset acted asynchronously"); end
      end
      @(posedge clk);
      if (reset) model = 0;
      else begin
        if (model == 16'hFFFF) wrapped = 1;
        model = (model + 1) & 16'hFFFF;
      end
      #1; checks++;
      if (q !== 16'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: expected %0d got %0d", i, model, q);
      end
    end
    checks++;
    if (!wrapped) begin failures++; $display("FAIL: never wrapped"); end
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
