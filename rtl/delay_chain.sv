// delay_chain - bidirectional register pipeline between one capture block
// and the readout circuit.
//
// Capture blocks are spread over the FPGA's super logic regions, so every
// signal between a capture block and its readout circuit passes DEPTH
// register stages. Towards the readout travel the data word at the Event
// Buffer output and the length writes for the Size FIFO; towards the capture
// block travel the read acknowledgement and the Size FIFO almost-full flag.
// The chain is free running and never stalled: the readout handles
// backpressure at its own end. Each output is its input DEPTH cycles later.
// The data stage next to the capture block samples the Event Buffer head
// every cycle; the readout knows from its delayed control which samples
// carry acknowledged words. Only the 1-bit valid-type stages are reset.
// DEPTH must be at least 2. The bidirectional chain follows the architecture;
// the default depth of 4 stages is this design's choice.
module delay_chain #(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned SIZE_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  // readout -> capture block
  input  logic              rd_ack_in,
  output logic              rd_ack_out,
  input  logic              afull_in,
  output logic              afull_out,
  // capture block -> readout
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  input  logic              size_wr_in,
  input  logic [SIZE_W-1:0] size_in,
  output logic              size_wr_out,
  output logic [SIZE_W-1:0] size_out
);
  logic [DEPTH-1:0]  ack_q, afull_q, size_wr_q;
  logic [DATA_W-1:0] data_q [DEPTH];
  logic [SIZE_W-1:0] size_q [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_q     <= '0;
      afull_q   <= '0;
      size_wr_q <= '0;
    end else begin
      ack_q     <= {ack_q[DEPTH-2:0], rd_ack_in};
      afull_q   <= {afull_q[DEPTH-2:0], afull_in};
      size_wr_q <= {size_wr_q[DEPTH-2:0], size_wr_in};
    end
  end

  always_ff @(posedge clk) begin
    data_q[0] <= data_in;
    size_q[0] <= size_in;
    for (int i = 1; i < DEPTH; i++) begin
      data_q[i] <= data_q[i-1];
      size_q[i] <= size_q[i-1];
    end
  end

  assign rd_ack_out  = ack_q[DEPTH-1];
  assign afull_out   = afull_q[DEPTH-1];
  assign size_wr_out = size_wr_q[DEPTH-1];
  assign data_out    = data_q[DEPTH-1];
  assign size_out    = size_q[DEPTH-1];

endmodule
