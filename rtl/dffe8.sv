// dffe8: octal D flip-flop register with clock enable and asynchronous
// clear and preset (the "8dffe" register of the original schematic).
//
// On a rising clk edge q takes d when ena is 1 and holds otherwise. clrn
// (active low) clears and prn (active low) presets all eight flip-flops at
// once, without waiting for the clock; clear wins if both are asserted,
// a priority that is this design's choice. In the frequency counter it sits
// between the BCD counters and the decoders: ena is DATA_STORE, clrn is the
// inverted master reset, prn is tied high, so the display holds the last
// completed measurement while a new one is being counted.
module dffe8 (
  input  logic       clk,
  input  logic       ena,
  input  logic       clrn,
  input  logic       prn,
  input  logic [7:0] d,
  output logic [7:0] q
);

  always_ff @(posedge clk or negedge clrn or negedge prn) begin
    if (!clrn)     q <= '0;
    else if (!prn) q <= '1;
    else if (ena)  q <= d;
  end

endmodule
