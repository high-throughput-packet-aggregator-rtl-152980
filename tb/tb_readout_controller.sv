// tb_readout_controller - the controller on its own, with the Size FIFOs
// modelled as queues. Checks the sequence of issued words (pointer,
// first/last flags, one-hot acknowledgement) against the expected order:
// per L1A, every enabled capture block in ascending order, one complete
// sub-packet each. Phase 1: all lengths available in advance and no
// backpressure, the words must be issued on consecutive cycles across
// block and event boundaries. Phase 2: random backpressure (nothing may be
// issued while it is high), lengths that arrive late (the controller must
// wait) and mask changes between events.
module tb_readout_controller;
  import readout_pkg::*;
  localparam int N = 10, SW = 12;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic l1a = 0, bp = 0;
  logic [N-1:0] cb_mask = '1, size_empty, size_rd, rd_ack;
  logic [SW-1:0] size_data = '0;
  logic [PTR_W-1:0] size_sel;
  word_ctrl_t ctrl;
  ctrl_state_t state;
  logic [7:0] pending;
  logic [31:0] events_sent;
  logic l1a_overflow;

  readout_controller dut (.*);

  int unsigned sq [N][$];      // Size FIFO model
  int unsigned late [N][$];    // lengths not yet written
  typedef struct packed { logic [PTR_W-1:0] sel; logic sop; logic eop; } w_t;
  w_t exp_q[$];
  int checks = 0, failures = 0, waits = 0, bp_cycles = 0, issued = 0, first_c = -1, last_c = 0, cyc = 0;
  int events_fired = 0;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d %s", cyc, s); end
  endtask

  // build the expected words of one event and stage its lengths
  task automatic trigger(input bit delayed);
    int fst = -1, lst = -1;
    for (int i = 0; i < N; i++) if (cb_mask[i]) begin if (fst < 0) fst = i; lst = i; end
    for (int i = 0; i < N; i++) if (cb_mask[i]) begin
      int unsigned l = $urandom_range(20, 1);
      for (int w = 0; w < int'(l); w++)
        exp_q.push_back('{PTR_W'(i), 1'(i == fst && w == 0), 1'(i == lst && w == int'(l) - 1)});
      if (delayed) late[i].push_back(l); else sq[i].push_back(l);
    end
    events_fired++;
  endtask

  // cycle loop: drive Size FIFO model, sample the controller, apply pops
  always begin
    @(negedge clk);
    cyc++;
    for (int i = 0; i < N; i++) begin
      if (late[i].size() != 0 && $urandom_range(15) == 0) sq[i].push_back(late[i].pop_front());
      size_empty[i] = (sq[i].size() == 0);
    end
    #0.2;
    size_data = (int'(size_sel) < N && sq[size_sel].size() != 0) ? SW'(sq[size_sel][0]) : '0;
    #0.2;
    if (rst_n) begin
      if (state == ST_WAIT_SIZE) waits++;
      if (bp) begin
        bp_cycles++;
        chk(!ctrl.valid && rd_ack == '0, "issued during backpressure");
      end
      chk(rd_ack == (ctrl.valid ? (N'(1) << ctrl.sel) : '0), "acknowledgement matches pointer");
      if (ctrl.valid) begin
        issued++;
        if (first_c < 0) first_c = cyc;
        last_c = cyc;
        if (exp_q.size() == 0) chk(0, "unexpected word");
        else begin
          w_t e;
          e = exp_q.pop_front();
          chk({ctrl.sel, ctrl.sop, ctrl.eop} == e,
              $sformatf("got sel=%0d sop=%b eop=%b exp sel=%0d sop=%b eop=%b", ctrl.sel, ctrl.sop, ctrl.eop, e.sel, e.sop, e.eop));
        end
      end
      for (int i = 0; i < N; i++) if (size_rd[i]) begin
        chk(sq[i].size() != 0 && int'(size_sel) == i, "size read of an empty FIFO");
        if (sq[i].size() != 0) void'(sq[i].pop_front());
      end
    end
  end

  task automatic fire_l1a();
    @(negedge clk) l1a = 1;
    @(negedge clk) l1a = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1: everything ready, no backpressure -> gapless
    repeat (15) trigger(0);
    total = exp_q.size();
    @(negedge clk) l1a = 1;
    repeat (15) @(negedge clk);
    l1a = 0;
    while (exp_q.size() != 0 && cyc < 20000) @(negedge clk);
    chk(issued == total && last_c - first_c + 1 == total,
        $sformatf("gapless: %0d words over %0d cycles", issued, last_c - first_c + 1));
    chk(state == ST_IDLE || pending == 0, "idle after phase 1");
    // phase 2: backpressure, late lengths, mask changes
    fork
      forever begin
        @(negedge clk);
        bp = bp ? ($urandom_range(2) != 0) : ($urandom_range(6) == 0);
      end
    join_none
    repeat (40) begin
      if ($urandom_range(3) == 0) begin
        while (!(state == ST_IDLE && pending == 0)) @(negedge clk);
        cb_mask = N'($urandom) | N'(1 << $urandom_range(N-1));
      end
      trigger(1);
      fire_l1a();
      repeat ($urandom_range(60)) @(negedge clk);
    end
    while (exp_q.size() != 0 && cyc < 150000) @(negedge clk);
    repeat (5) @(negedge clk);
    chk(exp_q.size() == 0, "all words issued");
    chk(events_sent == 32'(events_fired), "events counted");
    chk(pending == 0 && !l1a_overflow, "no triggers left");
    chk(waits > 0, "controller waited for data");
    chk(bp_cycles > 0, "backpressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
