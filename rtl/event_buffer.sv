// event_buffer - per-capture-block FIFO of event data words.
//
// The capture block writes the words of each sub-packet here; the readout
// circuit drains them with read acknowledgements that reach this end of the
// delay chain. The buffer is first-word-fall-through: rd_data always shows
// the oldest word, and rd_ack in a cycle consumes it, so the word can be
// captured by the first stage of the return pipeline in the same cycle.
// Depth is this design's choice (one maximum sub-packet of 2^12 words);
// the memory is a plain array, intended for the capture block's block RAM.
//
// Interface: wr_en/wr_data/full on the capture-block side; rd_ack/rd_data/
// empty on the readout side. A write to a full buffer and an
// acknowledgement to an empty one are ignored. Synchronous active-low reset.
module event_buffer #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 4096
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_ack,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_ack && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_rd) rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // The controller only acknowledges words that were announced by a length
  // in the Size FIFO, so an acknowledgement never meets an empty buffer.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_ack |-> !empty)
    else $error("event_buffer: read acknowledgement while empty");

endmodule
