// delay_module - fixed delay line for the controller's control signals.
//
// The controller issues a read acknowledgement and, in the same cycle, the
// control word that describes the requested word (valid, capture block
// pointer, first/last flags). The data word reaches the readout circuit
// after the round trip through the delay chain, twice the chain depth, so
// the control word is delayed by the same DELAY cycles here. This keeps the
// controller independent of the chain depth. The line is a plain shift
// register with no reset, the form that maps onto shift-register LUTs (one
// LUT per bit up to 32 cycles). dout(t) = din(t - DELAY); DELAY >= 1.
// The delay of twice the chain depth and the shift-register form follow the
// architecture; the contents of the control word are this design's.
module delay_module #(
  parameter int unsigned W     = 7,
  parameter int unsigned DELAY = 8
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] sr [DELAY];

  always_ff @(posedge clk) begin
    sr[0] <= din;
    for (int i = 1; i < DELAY; i++) sr[i] <= sr[i-1];
  end

  assign dout = sr[DELAY-1];
endmodule
