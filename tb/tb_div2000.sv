// tb_div2000: self-checking testbench of the divide-by-2000 timer.
//
// The default instance (N = 2000) is held in reset, released, and must then
// give its terminal count in the 2000th cycle and every 2000 cycles after
// that, for one cycle each time. A reset in mid-count must restart the
// period. A second instance with N = 7 checks the same with a small divisor.
`timescale 1ns/1ps
module tb_div2000;

  logic clk = 1'b0, reset = 1'b1;
  logic tc, tc7;
  int checks = 0, failures = 0;
  int k = 0;              // rising edges since reset was released
  int tcs = 0;

  div2000             dut  (.clk, .reset, .tc(tc));
  div2000 #(.N(7))    dut7 (.clk, .reset, .tc(tc7));

  always #250 clk = ~clk;

  // Check tc in the current cycle: the count is k, tc is due at count N-1
  task automatic check_now();
    checks++;
    if (tc !== (k % 2000 == 1999)) begin
      failures++; $display("FAIL: tc=%b after %0d edges", tc, k);
    end
    if (tc) tcs++;
    checks++;
    if (tc7 !== (k % 7 == 6)) begin
      failures++; $display("FAIL: tc7=%b after %0d edges", tc7, k);
    end
  endtask

  task automatic run(int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      k++;
      check_now();
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    k = 0;
    #1 check_now();
    run(3 * 2000 + 500);
    // Reset in mid-count: the period restarts
    @(negedge clk) reset = 1'b1;
    @(negedge clk) reset = 1'b0;
    k = 0;
    #1 check_now();
    run(2000 + 3);
    checks++;
    if (tcs != 4) begin failures++; $display("FAIL: %0d terminal counts, expected 4", tcs); end
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
