// readout_controller - capture block pointer and read control.
//
// For every L1A the controller reads, in ascending order, each capture block
// enabled in cb_mask, one complete sub-packet per block, and marks the first
// and last word of the resulting event packet:
//   IDLE       wait for a pending L1A (and a non-empty mask); point at the
//              first enabled block.
//   WAIT_SIZE  wait until the pointed block's Size FIFO holds a length,
//              i.e. new event data is available; register it.
//   READ       issue one read acknowledgement per cycle to the pointed
//              block while backpressure is low, counting the length down.
//              After the last word, move to the next enabled block; after
//              the last enabled block the event is complete.
// When the next length (of the next block, or of the next event's first
// block if another L1A is pending) is already available at the last word,
// it is loaded in the same cycle and reading continues without a gap, so
// the output carries one word per clock. Backpressure only gates the
// issuing of acknowledgements; the words already requested are caught by
// the backpressure FIFO, so nothing here depends on the delay-chain depth.
// L1As arriving while busy are counted (up to 2^L1A_CNT_W-1) and the mask is
// sampled at the start of each event; both are this design's choices.
//
// Outputs: rd_ack (one-hot, combinational from state, pointer and bp),
// ctrl (valid/sel/sop/eop of the word requested this cycle), size_sel and
// size_rd for the Size FIFOs (size_data must be the length of Size FIFO
// size_sel, combinationally). Lengths are 1..2^SIZE_W-1 words.
module readout_controller
  import readout_pkg::*;
#(
  parameter int unsigned N_CB      = 10,
  parameter int unsigned SIZE_W    = 12,
  parameter int unsigned L1A_CNT_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 l1a,
  input  logic [N_CB-1:0]      cb_mask,
  input  logic                 bp,
  input  logic [N_CB-1:0]      size_empty,
  input  logic [SIZE_W-1:0]    size_data,
  output logic [PTR_W-1:0]     size_sel,
  output logic [N_CB-1:0]      size_rd,
  output logic [N_CB-1:0]      rd_ack,
  output word_ctrl_t           ctrl,
  output ctrl_state_t          state,
  output logic [L1A_CNT_W-1:0] pending,
  output logic [31:0]          events_sent,
  output logic                 l1a_overflow
);
  logic [PTR_W-1:0]  ptr;
  logic [SIZE_W-1:0] cnt;
  logic              last_cb, first;
  logic [N_CB-1:0]   mask_q;

  // lowest enabled block strictly above position p (p = -1 via 'from_start')
  function automatic logic [PTR_W:0] find_next(input logic [N_CB-1:0] m,
                                               input logic [PTR_W-1:0] p,
                                               input logic from_start);
    logic [PTR_W:0] r;
    r = '0;  // bit PTR_W: found
    for (int i = N_CB-1; i >= 0; i--) begin
      if (m[i] && (from_start || PTR_W'(i) > p)) r = {1'b1, PTR_W'(i)};
    end
    return r;
  endfunction

  logic             word_go, last_word, end_of_event;
  logic [PTR_W:0]   nxt_in_event, first_live;
  logic             tgt_ok, tgt_new_event, load;
  logic [PTR_W-1:0] tgt;
  logic [N_CB-1:0]  tgt_mask;
  logic [PTR_W:0]   tgt_after;

  always_comb begin
    word_go      = (state == ST_READ) && !bp;
    last_word    = (cnt == SIZE_W'(1));
    end_of_event = word_go && last_word && last_cb;
    nxt_in_event = find_next(mask_q, ptr, 1'b0);
    first_live   = find_next(cb_mask, '0, 1'b1);

    // which Size FIFO could be loaded this cycle
    tgt_new_event = 1'b0;
    tgt_ok        = 1'b0;
    tgt           = ptr;
    tgt_mask      = mask_q;
    if (state == ST_WAIT_SIZE) begin
      tgt_ok = 1'b1;
    end else if (word_go && last_word) begin
      if (!last_cb) begin
        tgt_ok = 1'b1;
        tgt    = nxt_in_event[PTR_W-1:0];
      end else begin
        tgt_new_event = 1'b1;
        tgt_ok        = (pending > L1A_CNT_W'(1)) && first_live[PTR_W];
        tgt           = first_live[PTR_W-1:0];
        tgt_mask      = cb_mask;
      end
    end
    load      = tgt_ok && !size_empty[tgt];
    tgt_after = find_next(tgt_mask, tgt, 1'b0);

    size_sel = tgt;
    size_rd  = '0;
    if (load) size_rd[tgt] = 1'b1;

    rd_ack = '0;
    if (word_go) rd_ack[ptr] = 1'b1;
    ctrl.valid = word_go;
    ctrl.sel   = ptr;
    ctrl.sop   = first;
    ctrl.eop   = last_word && last_cb;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= ST_IDLE;
      ptr          <= '0;
      cnt          <= '0;
      last_cb      <= 1'b0;
      first        <= 1'b0;
      mask_q       <= '0;
      pending      <= '0;
      events_sent  <= '0;
      l1a_overflow <= 1'b0;
    end else begin
      // trigger bookkeeping
      if (l1a && !end_of_event && pending == '1) l1a_overflow <= 1'b1;
      else pending <= pending + L1A_CNT_W'(l1a) - L1A_CNT_W'(end_of_event);
      if (end_of_event) events_sent <= events_sent + 1'b1;

      if (word_go) begin
        first <= 1'b0;
        cnt   <= cnt - 1'b1;
      end

      unique case (state)
        ST_IDLE: begin
          if (pending != '0 && first_live[PTR_W]) begin
            ptr    <= first_live[PTR_W-1:0];
            mask_q <= cb_mask;
            first  <= 1'b1;
            state  <= ST_WAIT_SIZE;
          end
        end
        ST_WAIT_SIZE, ST_READ: begin
          if (load) begin
            ptr     <= tgt;
            cnt     <= size_data;
            last_cb <= !tgt_after[PTR_W];
            state   <= ST_READ;
            if (tgt_new_event) begin
              mask_q <= cb_mask;
              first  <= 1'b1;
            end
          end else if (word_go && last_word) begin
            if (tgt_ok) begin
              ptr   <= tgt;                 // next block has no data yet
              state <= ST_WAIT_SIZE;
              if (tgt_new_event) begin
                mask_q <= cb_mask;
                first  <= 1'b1;
              end
            end else begin
              state <= ST_IDLE;             // no further L1A pending
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  a_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n) load |-> size_data != '0)
    else $error("readout_controller: zero-length sub-packet");

endmodule
