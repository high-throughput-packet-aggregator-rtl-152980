// cb_emulator - behavioural model of a capture block for the testbenches.
//
// Stands in for a capture block the way the hardware test did: when enabled
// and an L1A arrives it queues one sub-packet of pkt_len words (sampled at
// the trigger), writes its words into the Event Buffer one per cycle while
// the buffer is not full (with random idle cycles when gaps is set), and
// then writes the length into the Size FIFO while almost full is low.
// Word format: every 64-bit lane k of a word holds
// {8'cb id, 24'event number, 32'word index} with k XORed into its top byte
// (see word()); the event number counts the triggers this emulator answered. Write strobes are
// combinational from registered state and the full flags. Not synthesizable.
module cb_emulator #(
  parameter int unsigned CB_ID  = 0,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned SIZE_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              l1a,
  input  logic [SIZE_W-1:0] pkt_len,
  input  logic              gaps,
  output logic              evt_wr_en,
  output logic [DATA_W-1:0] evt_wr_data,
  input  logic              evt_full,
  output logic              size_wr_en,
  output logic [SIZE_W-1:0] size_wr_data,
  input  logic              size_afull,
  output int                full_stalls,
  output int                afull_stalls
);
  int unsigned q_len[$];
  int unsigned ev, idx, cur_len;
  logic        busy, posting, idle_cyc;

  // reference pattern, also used by the testbenches' checkers
  function automatic logic [DATA_W-1:0] word(input int unsigned id, input int unsigned e,
                                             input int unsigned i);
    logic [DATA_W-1:0] r;
    for (int k = 0; k < DATA_W / 64; k++)
      r[k*64 +: 64] = {8'(id) ^ 8'(k), 24'(e), 32'(i)};
    return r;
  endfunction

  always_comb begin
    evt_wr_data  = word(CB_ID, ev, idx);
    evt_wr_en    = busy && !evt_full && !idle_cyc;
    size_wr_en   = posting && !size_afull;
    size_wr_data = SIZE_W'(cur_len);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      q_len.delete();
      ev <= 0; idx <= 0; cur_len <= 0; busy <= 0; posting <= 0; idle_cyc <= 0;
      full_stalls <= 0; afull_stalls <= 0;
    end else begin
      idle_cyc <= gaps && ($urandom_range(3) == 0);
      if (enable && l1a) q_len.push_back(int'(pkt_len));
      if (busy && evt_full) full_stalls <= full_stalls + 1;
      if (posting && size_afull) afull_stalls <= afull_stalls + 1;
      if (!busy && !posting && q_len.size() > 0) begin
        cur_len <= q_len.pop_front();
        busy    <= 1;
        idx     <= 0;
      end
      if (evt_wr_en) begin
        idx <= idx + 1;
        if (idx + 1 == cur_len) begin
          busy    <= 0;
          posting <= 1;
        end
      end
      if (size_wr_en) begin
        posting <= 0;
        ev      <= ev + 1;
      end
    end
  end
endmodule
