// bp_fifo - backpressure FIFO at the output of the readout circuit.
//
// Every word requested before the SLink raised backpressure is still on its
// way through the delay chain; this FIFO catches them. Its read enable is
// the negated backpressure, so while the SLink accepts data it behaves as a
// one-word register, and while backpressure is high it fills with the words
// in flight. The controller therefore only has to stop issuing requests.
// Written as a shift-register FIFO (the shift-register LUT form): a write
// shifts every entry one place and puts the new word at position 0; the
// oldest word sits at position count-1. The default depth is twice the
// pipeline depth plus the word already presented to the SLink.
//
// Interface: wr_en/wr_data in; rd_data is the oldest word, valid when
// !empty, consumed by rd_en. count is the occupancy; overflow is sticky and
// reports a write that met a full FIFO (a sizing error).
module bp_fifo #(
  parameter int unsigned W     = 66,
  parameter int unsigned DEPTH = 9
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0] sr [DEPTH];
  logic         full, do_wr, do_rd;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = empty ? '0 : sr[count - 1'b1];

  always_ff @(posedge clk) begin
    if (do_wr) begin
      sr[0] <= wr_data;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      count <= count + CW'(do_wr) - CW'(do_rd);
      if (wr_en && !do_wr) overflow <= 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> do_wr)
    else $error("bp_fifo: write while full, words lost");

endmodule
