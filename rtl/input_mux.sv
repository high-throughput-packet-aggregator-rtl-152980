// input_mux - capture block multiplexer of the readout circuit.
//
// Selects input sel out of N inputs of W bits each. The readout circuit uses
// two of these: one for the data words returning from the capture blocks,
// steered by the delayed capture block pointer, and one for the Size FIFO
// lengths, steered by the controller's current pointer. Purely
// combinational (an AND-OR tree); a pointer beyond N-1 selects nothing and
// gives zero. The two multiplexers follow the architecture; making them
// combinational rather than registered is this design's choice.
module input_mux #(
  parameter int unsigned N     = 10,
  parameter int unsigned W     = 64,
  parameter int unsigned SEL_W = 4
) (
  input  logic [SEL_W-1:0] sel,
  input  logic [W-1:0]     din [N],
  output logic [W-1:0]     dout
);
  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) begin
      dout |= din[i] & {W{sel == SEL_W'(i)}};
    end
  end
endmodule
