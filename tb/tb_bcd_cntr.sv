// tb_bcd_cntr: self-checking testbench of one BCD decade.
//
// Random ce and clr, applied at the falling clock edge. An integer model of
// a 0..9 counter (clear first, then count, wrap 9 -> 0) gives the expected
// count after each rising edge, and the expected terminal count (count 9
// while ce is 1) before it.
`timescale 1ns/1ps
module tb_bcd_cntr;

  logic clk = 1'b0, ce = 1'b0, clr = 1'b1;
  logic [3:0] q;
  logic tc;
  int checks = 0, failures = 0, model = 0, wraps = 0;

  bcd_cntr dut (.*);

  always #250 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    checks++;
    if (q !== 4'd0) begin failures++; $display("FAIL: clear gave %0d", q); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ce  = 1'(($urandom % 4) != 0);
      clr = 1'(($urandom % 40) == 0);
      #1;
      checks++;
      if (tc !== (ce && model == 9)) begin
        failures++; $display("FAIL cycle %0d: tc %b, count %0d ce %b", i, tc, model, ce);
      end
      @(posedge clk);
      if (clr) model = 0;
      else if (ce) begin
        if (model == 9) wraps++;
        model = (model + 1) % 10;
      end
      #1;
      checks++;
      if (q !== 4'(model)) begin
        failures++; $display("FAIL cycle %0d: expected %0d got %0d", i, model, q);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: counter never wrapped"); end
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
