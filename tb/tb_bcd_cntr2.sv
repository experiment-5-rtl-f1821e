// tb_bcd_cntr2: self-checking testbench of the two-digit BCD counter.
//
// An integer model counting 0..99 with wrap gives the expected tens and
// units digits after every clock; tc must be 1 exactly when the count is 99
// and ce is 1. Mostly ce is held high so the counter passes 99 many times;
// clr is applied now and then.
`timescale 1ns/1ps
module tb_bcd_cntr2;

  logic clk = 1'b0, ce = 1'b0, clr = 1'b1;
  logic [3:0] tens, ones;
  logic tc;
  int checks = 0, failures = 0, model = 0, wraps = 0;

  bcd_cntr2 dut (.*);

  always #250 clk = ~clk;

  initial begin
    @(posedge clk);
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      ce  = 1'(($urandom % 8) != 0);
      clr = 1'(($urandom % 700) == 0);
      #1;
      checks++;
      if (tc !== (ce && model == 99)) begin
        failures++; $display("FAIL cycle %0d: tc %b count %0d", i, tc, model);
      end
      @(posedge clk);
      if (clr) model = 0;
      else if (ce) begin
        if (model == 99) wraps++;
        model = (model + 1) % 100;
      end
      #1;
      checks++;
      if (tens !== 4'(model / 10) || ones !== 4'(model % 10)) begin
        failures++; $display("FAIL cycle %0d: expected %0d got %0d%0d", i, model, tens, ones);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: never wrapped past 99"); end
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
