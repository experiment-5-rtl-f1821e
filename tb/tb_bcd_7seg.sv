// tb_bcd_7seg: exhaustive testbench of the BCD to 7-segment decoder.
//
// The expected segments are written as the letters a..g that a seven
// segment digit lights for each numeral (a top, b upper right, c lower
// right, d bottom, e lower left, f upper left, g middle), and converted to
// the {G,F,E,D,C,B,A} bit order here. Codes 10..15 must blank the digit.
`timescale 1ns/1ps
module tb_bcd_7seg;

  logic [3:0] d;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  bcd_7seg dut (.*);

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic logic [6:0] to_bits(string s);
    logic [6:0] b = '0;
    foreach (s[i]) b[s[i] - "a"] = 1'b1;
    return b;
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [6:0] exp;
      d = 4'(v);
      #10;
      exp = (v < 10) ? to_bits(lit[v]) : 7'b0;
      checks++;
      if (seg !== exp) begin
        failures++; $display("FAIL digit %0d: expected %b got %b", v, exp, seg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
