// readout_circuit - packet aggregator from N_CB capture blocks to one SLink.
//
// For every Level-1 Accept the circuit sends one event packet made of one
// sub-packet from each capture block enabled by software, in ascending
// capture block order, never interleaving two blocks. Each capture block
// connects through:
//   * an Event Buffer (at the capture block end) holding its data words,
//   * a Size FIFO (at the readout end) holding one length per sub-packet,
//   * a bidirectional delay chain of PIPE_DEPTH stages between the two ends.
// The controller points at one capture block and issues read
// acknowledgements; they travel the chain, pop the Event Buffer, and the
// word comes back after 2 x PIPE_DEPTH cycles. The delay module delays the
// matching control word (valid, pointer, first/last flags) by the same
// amount, so the data multiplexer selects the right block when the word
// arrives. The backpressure FIFO at the output catches the words still in
// flight when the SLink raises backpressure, which the controller simply
// treats as "do not issue". Neither the controller nor the FIFO sizing logic
// has to know the chain depth beyond the two delay parameters derived here.
//
// Ports: per capture block, Event Buffer write (wr_en/data/full) and Size
// FIFO write (wr_en/length, afull returned through the chain, so a capture
// block must stop writing lengths while cb_size_afull is high); l1a pulse;
// a register port (see readout_regs); the SLink-side stream slink_data/
// valid/sop/eop, transferred in every cycle with slink_valid && !slink_bp.
// A capture block must write a sub-packet's length only after all its
// words are in its Event Buffer. Throughput is one word per clock
// (64 bit at 380 MHz = 24.3 Gb/s). Synchronous active-low reset.
//
// The block structure, the depths of the delay module and backpressure
// FIFO as twice the pipeline depth, and the round-robin read order follow
// the architecture; Size FIFO placement, the register map, the sop/eop
// framing and the buffer depths are this design's choices.
module readout_circuit
  import readout_pkg::*;
#(
  parameter int unsigned N_CB       = N_CB_DEF,
  parameter int unsigned DATA_W     = DATA_W_DEF,
  parameter int unsigned SIZE_W     = SIZE_W_DEF,
  parameter int unsigned PIPE_DEPTH = PIPE_DEPTH_DEF,
  parameter int unsigned EVT_DEPTH  = EVT_DEPTH_DEF,
  parameter int unsigned SIZE_DEPTH = SIZE_DEPTH_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  // capture block side
  input  logic              cb_evt_wr_en    [N_CB],
  input  logic [DATA_W-1:0] cb_evt_wr_data  [N_CB],
  output logic              cb_evt_full     [N_CB],
  input  logic              cb_size_wr_en   [N_CB],
  input  logic [SIZE_W-1:0] cb_size_wr_data [N_CB],
  output logic              cb_size_afull   [N_CB],
  // trigger
  input  logic              l1a,
  // register port (IPBus slave side)
  input  logic              reg_we,
  input  logic [1:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  // SLink side
  output logic [DATA_W-1:0] slink_data,
  output logic              slink_valid,
  output logic              slink_sop,
  output logic              slink_eop,
  input  logic              slink_bp
);
  localparam int unsigned RT_DELAY = 2 * PIPE_DEPTH;     // acknowledgement to data
  localparam int unsigned BP_DEPTH = 2 * PIPE_DEPTH + 1; // words in flight + output word
  localparam int unsigned BP_W     = DATA_W + 2;
  localparam int unsigned OCC_W    = $clog2(BP_DEPTH + 1);
  localparam int unsigned PEND_W   = 8;

  // ---------------------------------------------------------------- per CB
  logic [N_CB-1:0]   rd_ack, size_rd, size_empty, size_ovf;
  logic [DATA_W-1:0] ret_data  [N_CB];
  logic [SIZE_W-1:0] size_head [N_CB];

  for (genvar i = 0; i < N_CB; i++) begin : g_cb
    logic              ack_at_cb, afull, size_wr;
    logic [DATA_W-1:0] evt_head;
    logic [SIZE_W-1:0] size_w;

    event_buffer #(.W(DATA_W), .DEPTH(EVT_DEPTH)) u_evt (
      .clk, .rst_n,
      .wr_en(cb_evt_wr_en[i]), .wr_data(cb_evt_wr_data[i]), .full(cb_evt_full[i]),
      .rd_ack(ack_at_cb), .rd_data(evt_head), .empty()
    );

    delay_chain #(.DEPTH(PIPE_DEPTH), .DATA_W(DATA_W), .SIZE_W(SIZE_W)) u_chain (
      .clk, .rst_n,
      .rd_ack_in(rd_ack[i]), .rd_ack_out(ack_at_cb),
      .afull_in(afull), .afull_out(cb_size_afull[i]),
      .data_in(evt_head), .data_out(ret_data[i]),
      .size_wr_in(cb_size_wr_en[i]), .size_in(cb_size_wr_data[i]),
      .size_wr_out(size_wr), .size_out(size_w)
    );

    size_fifo #(.W(SIZE_W), .DEPTH(SIZE_DEPTH), .AFULL_MARGIN(2 * PIPE_DEPTH)) u_size (
      .clk, .rst_n,
      .wr_en(size_wr), .wr_data(size_w),
      .rd_en(size_rd[i]), .rd_data(size_head[i]), .empty(size_empty[i]),
      .afull(afull), .overflow(size_ovf[i])
    );
  end

  // ------------------------------------------------------------- control
  logic [N_CB-1:0]   cb_mask;
  logic [SIZE_W-1:0] size_sel_data;
  logic [PTR_W-1:0]  size_sel;
  word_ctrl_t        ctrl, ctrl_d;
  ctrl_state_t       state;
  logic [PEND_W-1:0] pending;
  logic [31:0]       events_sent;
  logic              l1a_overflow;

  input_mux #(.N(N_CB), .W(SIZE_W), .SEL_W(PTR_W)) u_size_mux (
    .sel(size_sel), .din(size_head), .dout(size_sel_data)
  );

  readout_controller #(.N_CB(N_CB), .SIZE_W(SIZE_W), .L1A_CNT_W(PEND_W)) u_ctrl (
    .clk, .rst_n, .l1a, .cb_mask, .bp(slink_bp),
    .size_empty, .size_data(size_sel_data), .size_sel, .size_rd,
    .rd_ack, .ctrl, .state, .pending, .events_sent, .l1a_overflow
  );

  delay_module #(.W(CTRL_W), .DELAY(RT_DELAY)) u_delay (
    .clk, .din(ctrl), .dout(ctrl_d)
  );

  // The delay line has no reset: ignore its output until it has been
  // refilled with the controller's (reset) output.
  logic [$clog2(RT_DELAY+1)-1:0] flush_cnt;
  logic                          flushed;
  always_ff @(posedge clk) begin
    if (!rst_n)       flush_cnt <= '0;
    else if (!flushed) flush_cnt <= flush_cnt + 1'b1;
  end
  assign flushed = (flush_cnt == ($clog2(RT_DELAY+1))'(RT_DELAY));

  // -------------------------------------------------------------- output
  logic [DATA_W-1:0] mux_data;
  logic [BP_W-1:0]   bp_out;
  logic [OCC_W-1:0]  bp_count;
  logic              bp_empty, bp_ovf;

  input_mux #(.N(N_CB), .W(DATA_W), .SEL_W(PTR_W)) u_data_mux (
    .sel(ctrl_d.sel), .din(ret_data), .dout(mux_data)
  );

  bp_fifo #(.W(BP_W), .DEPTH(BP_DEPTH)) u_bp_fifo (
    .clk, .rst_n,
    .wr_en(ctrl_d.valid && flushed), .wr_data({ctrl_d.sop, ctrl_d.eop, mux_data}),
    .rd_en(!slink_bp), .rd_data(bp_out), .empty(bp_empty), .count(bp_count),
    .overflow(bp_ovf)
  );

  assign slink_valid = !bp_empty;
  assign slink_sop   = bp_out[DATA_W+1];
  assign slink_eop   = bp_out[DATA_W];
  assign slink_data  = bp_out[DATA_W-1:0];

  // ----------------------------------------------------------- registers
  readout_regs #(.N_CB(N_CB), .PEND_W(PEND_W), .OCC_W(OCC_W)) u_regs (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .cb_mask,
    .events_sent, .pending, .l1a_overflow,
    .fifo_overflow(bp_ovf || (|size_ovf)), .ctrl_state(state), .bp_occupancy(bp_count)
  );

  // ---------------------------------------------------------- assertions
  // A word offered under backpressure stays offered, unchanged.
  a_hold_under_bp: assert property (@(posedge clk) disable iff (!rst_n)
      (slink_valid && slink_bp) |=> (slink_valid && $stable(slink_data) &&
                                     $stable(slink_sop) && $stable(slink_eop)))
    else $error("readout_circuit: output changed under backpressure");
  // The backpressure FIFO is sized for every word in flight.
  a_bp_fifo_fits: assert property (@(posedge clk) disable iff (!rst_n) !bp_ovf)
    else $error("readout_circuit: backpressure FIFO overflow");

endmodule
