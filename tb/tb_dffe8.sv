// tb_dffe8: self-checking testbench of the octal enabled register.
//
// Random data and enable at the falling edge; the model loads on a rising
// edge only when ena is 1. The active-low clear and preset are pulsed
// between clock edges and must act at once, with clear winning over preset.
`timescale 1ns/1ps
module tb_dffe8;

  logic clk = 1'b0, ena = 1'b0, clrn = 1'b1, prn = 1'b1;
  logic [7:0] d = '0, q, model = '0;
  int checks = 0, failures = 0;

  dffe8 dut (.*);

  always #250 clk = ~clk;

  task automatic check(logic [7:0] exp, string tag);
    checks++;
    if (q !== exp) begin failures++; $display("FAIL %s: expected %h got %h", tag, exp, q); end
  endtask

  initial begin
    #5 clrn = 1'b0;
    #5 check(8'h00, "clear at start");
    @(negedge clk) clrn = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      d = 8'($urandom); ena = 1'($urandom);
      @(posedge clk);
      if (ena) model = d;
      #1 check(model, "load/hold");
      if (i % 500 == 250) begin
        #100 prn = 1'b0; #1 check(8'hFF, "async preset");
        #10 clrn = 1'b0; #1 check(8'h00, "clear over preset");
        #10 prn = 1'b1; clrn = 1'b1;
        model = 8'h00;
        #1 check(model, "after release");
      end
    end
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
