// rise_detect: 0->1 transition detector for the frequency counter input.
//
// A two-state machine with one input and one output. Its single state
// flip-flop remembers the input's value at the previous clock edge (state
// LOW = 0, state HIGH = 1); the output is the Mealy term
//   pulse = sig & ~state
// so it is 1 for exactly one clock period after each rising transition of
// sig. The original asks for this machine but does not give its design;
// the Mealy form is this design's choice, as it needs only the two states.
// reset is active high and asynchronous and puts the machine in LOW.
//
// Interface: sig must already be synchronized to clk. pulse is combinational
// from sig and the state: it rises with sig and falls at the next clock edge.
module rise_detect (
  input  logic clk,
  input  logic reset,
  input  logic sig,
  output logic pulse
);

  logic state;   // 1: input was high at the previous edge

  always_ff @(posedge clk or posedge reset) begin
    if (reset) state <= 1'b0;
    else       state <= sig;
  end

  assign pulse = sig & ~state;

endmodule
