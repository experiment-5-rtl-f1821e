// synchronizer: samples an asynchronous input into the clk domain through
// a chain of STAGES D flip-flops.
//
// The output can only change right after a rising clk edge, so logic that
// reads it sees one value at every flip-flop. The frequency counter uses a
// single flip-flop (STAGES = 1); the general scheme is a chain of two, which
// STAGES = 2 gives. reset is active high and asynchronous and clears every
// flip-flop of the chain to 0, as the master reset requires; the use of the
// flip-flops' clear input for it is this design's choice.
//
// Timing: sync_out follows async_in STAGES clock edges later.
module synchronizer #(
  parameter int unsigned STAGES = 1
) (
  input  logic clk,
  input  logic reset,
  input  logic async_in,
  output logic sync_out
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) chain <= '0;
    else begin
      chain[0] <= async_in;
      for (int i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
    end
  end

  assign sync_out = chain[STAGES-1];

  initial assert (STAGES >= 1) else $fatal(1, "synchronizer: STAGES must be at least 1");

endmodule
