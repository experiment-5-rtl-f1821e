// count16: 16-bit binary up counter with synchronous reset.
//
// On every rising clk edge q is set to 0 when reset is 1 and otherwise
// incremented, wrapping from 16'hFFFF to 0. There is no enable. The port
// list (CLK, RESET, Q[15..0]) follows the counter symbol of the original
// schematic, and the reset is synchronous as the original states for the
// divide-by-2000 counter built on it. The value after power-up is unknown
// until the first reset.
module count16 (
  input  logic        clk,
  input  logic        reset,
  output logic [15:0] q
);

  always_ff @(posedge clk) begin
    if (reset) q <= '0;
    else       q <= q + 16'd1;
  end

endmodule
