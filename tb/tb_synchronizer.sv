// tb_synchronizer: self-checking testbench of the input synchronizer.
//
// Two instances are tested, the default single flip-flop and a two-stage
// chain. The input changes at random times between clock edges; a
// reference history of the input's value at each rising edge predicts the
// output, which must equal the input sampled STAGES edges earlier. The
// asynchronous reset must clear the output to 0 at once.
`timescale 1ns/1ps
module tb_synchronizer;

  logic clk = 1'b0, reset = 1'b1, async_in = 1'b0;
  logic out1, out2;
  logic [1:0] hist;     // input sampled at the last two rising edges
  int checks = 0, failures = 0;

  synchronizer                u1 (.clk, .reset, .async_in, .sync_out(out1));
  synchronizer #(.STAGES(2))  u2 (.clk, .reset, .async_in, .sync_out(out2));

  always #250 clk = ~clk;

  task automatic check(logic got, logic exp, string tag);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: expected %b got %b", tag, exp, got);
    end
  endtask

  initial begin
    hist = '0;
    repeat (2) @(posedge clk);
    check(out1, 1'b0, "reset 1"); check(out2, 1'b0, "reset 2");
    @(negedge clk) reset = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      #($urandom_range(1, 499)) async_in = 1'($urandom);
      @(posedge clk);
      hist = {hist[0], async_in};
      #1;
      check(out1, hist[0], "one stage");
      check(out2, hist[1], "two stages");
    end
    // Load ones, then reset asynchronously
    async_in = 1'b1;
    repeat (3) @(posedge clk);
    #100 reset = 1'b1; #1;
    check(out1, 1'b0, "async reset 1"); check(out2, 1'b0, "async reset 2");
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
