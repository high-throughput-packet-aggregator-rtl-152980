// size_fifo - per-capture-block FIFO of sub-packet lengths.
//
// Holds one 12-bit entry for every sub-packet the capture block has placed
// in its Event Buffer. It sits at the readout end of the delay chain, so the
// controller sees "new event data available" (not empty) and the length at
// once, whatever the chain depth. Because length writes and the almost-full
// flag both cross the chain, afull is raised AFULL_MARGIN entries early
// (2 x chain depth by default), which covers every write already in flight.
// The entries are a small register array (LUT RAM); rd_data is the oldest
// entry (first-word-fall-through), consumed by rd_en. Depth and margin are
// this design's choices. Synchronous active-low reset.
module size_fifo #(
  parameter int unsigned W            = 12,
  parameter int unsigned DEPTH        = 32,
  parameter int unsigned AFULL_MARGIN = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         afull,
  output logic         overflow   // sticky: a write met a full FIFO
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic          full, do_wr, do_rd;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign afull   = (count >= (AW+1)'(DEPTH - AFULL_MARGIN));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_rd) rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en && full) overflow <= 1'b1;
    end
  end

endmodule
