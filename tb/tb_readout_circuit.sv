// tb_readout_circuit - end-to-end test of the readout circuit at its default
// size (10 capture blocks, 64-bit words, 4-stage delay chains).
//
// Ten capture block emulators feed the circuit; a model of the SLink sender
// consumes the stream with programmable backpressure and compares every word,
// with its first/last flags, against a reference stream built when each L1A
// is fired: for each enabled capture block in ascending order, its
// sub-packet words {id, event, index}. Phases: random traffic with random
// backpressure, a capture block mask change, slow capture blocks (the
// controller must wait for data), a trigger burst under long backpressure
// (Size FIFO almost full, queued triggers), two maximum-length events that
// fill the Event Buffers, and a saturated run whose duration must equal its
// word count (one word per clock, 24.3 Gb/s at 380 MHz). Each mechanism is
// counted and a failure is counted for any that never happened.
module tb_readout_circuit;
  import readout_pkg::*;

  localparam int N      = N_CB_DEF;
  localparam int DW     = DATA_W_DEF;
  localparam int SW     = SIZE_W_DEF;
  localparam int BP_MAX = 2 * PIPE_DEPTH_DEF + 1;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic          evt_wr_en [N], evt_full [N], size_wr_en [N], size_afull [N];
  logic [DW-1:0] evt_wr_data [N];
  logic [SW-1:0] size_wr_data [N];
  logic          l1a = 0;
  logic          reg_we = 0;
  logic [1:0]    reg_addr = 0;
  logic [31:0]   reg_wdata = 0, reg_rdata;
  logic [DW-1:0] slink_data;
  logic          slink_valid, slink_sop, slink_eop, slink_bp;

  readout_circuit dut (
    .clk, .rst_n,
    .cb_evt_wr_en(evt_wr_en), .cb_evt_wr_data(evt_wr_data), .cb_evt_full(evt_full),
    .cb_size_wr_en(size_wr_en), .cb_size_wr_data(size_wr_data), .cb_size_afull(size_afull),
    .l1a, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .slink_data, .slink_valid, .slink_sop, .slink_eop, .slink_bp
  );

  logic [N-1:0]  en = '1;
  logic [SW-1:0] len [N];
  logic          gaps = 0;
  int            full_stalls [N], afull_stalls [N];

  for (genvar i = 0; i < N; i++) begin : g_emu
    cb_emulator #(.CB_ID(i), .DATA_W(DW), .SIZE_W(SW)) u_emu (
      .clk, .rst_n, .enable(en[i]), .l1a, .pkt_len(len[i]), .gaps,
      .evt_wr_en(evt_wr_en[i]), .evt_wr_data(evt_wr_data[i]), .evt_full(evt_full[i]),
      .size_wr_en(size_wr_en[i]), .size_wr_data(size_wr_data[i]), .size_afull(size_afull[i]),
      .full_stalls(full_stalls[i]), .afull_stalls(afull_stalls[i])
    );
  end

  // ------------------------------------------------------------ reference
  typedef logic [DW+1:0] exp_t;   // {sop, eop, data}
  exp_t        exp_q[$];
  int unsigned ev_no [N];
  int          checks = 0, failures = 0;
  int          events_fired = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // fire one L1A with the given lengths; the reference follows the mask
  task automatic fire();
    int first_cb = -1, last_cb = -1;
    for (int i = 0; i < N; i++) if (en[i]) begin
      if (first_cb < 0) first_cb = i;
      last_cb = i;
    end
    for (int i = 0; i < N; i++) if (en[i]) begin
      for (int w = 0; w < int'(len[i]); w++) begin
        logic [63:0] d;
        d = {8'(i), 24'(ev_no[i]), 32'(w)};
        exp_q.push_back({1'(i == first_cb && w == 0), 1'(i == last_cb && w == int'(len[i]) - 1), DW'(d)});
      end
      ev_no[i]++;
    end
    events_fired++;
    @(posedge clk) l1a <= 1;
    @(posedge clk) l1a <= 0;
    @(posedge clk);   // lengths may change only after the trigger was sampled
  endtask

  task automatic rand_len(input int lo, input int hi);
    for (int i = 0; i < N; i++) len[i] = SW'($urandom_range(hi, lo));
  endtask

  // ------------------------------------------------------- SLink sink model
  int  bp_mode = 0;      // 0 never, 1 random bursts, 2 always
  int  words_rx = 0, bp_stalls = 0, back_to_back = 0;
  int  occ_max = 0, wait_cycles = 0, pending_max = 0;
  bit  last_was_eop = 0;

  always @(posedge clk) begin
    if (!rst_n) slink_bp <= 0;
    else case (bp_mode)
      0: slink_bp <= 0;
      1: slink_bp <= slink_bp ? ($urandom_range(3) != 0) : ($urandom_range(5) == 0);
      default: slink_bp <= 1;
    endcase
  end

  always @(posedge clk) if (rst_n) begin
    if (slink_valid && slink_bp) bp_stalls++;
    if (int'(dut.u_bp_fifo.count) > occ_max) occ_max = int'(dut.u_bp_fifo.count);
    if (dut.u_ctrl.state == ST_WAIT_SIZE) wait_cycles++;
    if (int'(dut.u_ctrl.pending) > pending_max) pending_max = int'(dut.u_ctrl.pending);
    if (slink_valid && !slink_bp) begin
      words_rx++;
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        exp_t e;
        e = exp_q.pop_front();
        check({slink_sop, slink_eop, slink_data} == e,
              $sformatf("word %0d got sop=%b eop=%b %h exp %h", words_rx, slink_sop, slink_eop, slink_data, e));
      end
      if (slink_sop && last_was_eop) back_to_back++;
      last_was_eop = slink_eop;
    end else last_was_eop = 0;
  end

  task automatic drain(input int max_cycles);
    int c = 0;
    while ((exp_q.size() != 0) && c < max_cycles) begin
      @(posedge clk);
      c++;
    end
    check(exp_q.size() == 0, $sformatf("drain left %0d words", exp_q.size()));
    repeat (4 * PIPE_DEPTH_DEF + 4) @(posedge clk);
  endtask

  task automatic reg_write(input logic [1:0] a, input logic [31:0] d);
    @(posedge clk) begin reg_we <= 1; reg_addr <= a; reg_wdata <= d; end
    @(posedge clk) reg_we <= 0;
  endtask

  task automatic reg_read(input logic [1:0] a, output logic [31:0] d);
    @(posedge clk) reg_addr <= a;
    @(posedge clk) d = reg_rdata;
  endtask

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int t0, t1, nwords;
    for (int i = 0; i < N; i++) begin len[i] = 1; ev_no[i] = 0; end
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (4 * PIPE_DEPTH_DEF) @(posedge clk);

    // 1: random traffic, random backpressure
    bp_mode = 1;
    repeat (40) begin
      rand_len(1, 60);
      fire();
      repeat ($urandom_range(300, 20)) @(posedge clk);
    end
    drain(200000);

    // 2: capture block mask change
    en = 10'b10_1001_0011;
    reg_write(2'd0, 32'(en));
    reg_read(2'd0, r);
    check(r[N-1:0] == en, "mask read back");
    repeat (20) begin
      rand_len(1, 40);
      fire();
      repeat ($urandom_range(150, 10)) @(posedge clk);
    end
    drain(200000);
    en = '1;
    reg_write(2'd0, 32'(en));

    // 3: slow capture blocks, controller waits for data
    gaps = 1;
    bp_mode = 0;
    repeat (10) begin
      rand_len(20, 80);
      fire();
    end
    drain(200000);
    gaps = 0;

    // 4: trigger burst under long backpressure: triggers queue, Size FIFOs fill
    bp_mode = 2;
    repeat (30) begin
      rand_len(1, 2);
      fire();
      repeat (3) @(posedge clk);
    end
    repeat (300) @(posedge clk);
    bp_mode = 1;
    drain(200000);

    // 5: two maximum-length events under backpressure: Event Buffers fill
    bp_mode = 2;
    for (int i = 0; i < N; i++) len[i] = SW'((1 << SW) - 1);
    fire();
    fire();
    repeat (9000) @(posedge clk);
    bp_mode = 0;
    drain(400000);

    // 6: saturated readout: all data waiting, then released
    bp_mode = 2;
    nwords = 0;
    repeat (20) begin
      for (int i = 0; i < N; i++) len[i] = 50;   // 500 words per L1A
      nwords += 500;
      fire();
    end
    repeat (2000) @(posedge clk);
    bp_mode = 0;
    t0 = words_rx;
    @(posedge clk);
    while (!(slink_valid && !slink_bp)) @(posedge clk);
    t1 = 0;
    while (exp_q.size() != 0 && t1 < 100000) begin @(posedge clk); t1++; end
    check(t1 == nwords, $sformatf("saturated run: %0d words in %0d cycles", nwords, t1));
    drain(1000);

    // status registers
    reg_read(2'd1, r);
    check(r == 32'(events_fired), $sformatf("events sent %0d exp %0d", r, events_fired));
    reg_read(2'd2, r);
    check(r[9:8] == 2'b00, "no overflow flags");
    check(r[7:0] == 8'd0, "no pending triggers left");
    reg_read(2'd3, r);
    check(int'(r) == occ_max, "occupancy register");

    // mechanisms
    check(bp_stalls > 0, $sformatf("backpressure stalls: %0d", bp_stalls));
    check(occ_max == BP_MAX, $sformatf("backpressure FIFO peak %0d, expected %0d", occ_max, BP_MAX));
    check(wait_cycles > 0, $sformatf("controller waits for data: %0d", wait_cycles));
    check(pending_max > 1, $sformatf("queued triggers: %0d", pending_max));
    check(back_to_back > 0, $sformatf("back-to-back events: %0d", back_to_back));
    begin
      int fs, as;
      fs = 0;
      as = 0;
      for (int i = 0; i < N; i++) begin fs += full_stalls[i]; as += afull_stalls[i]; end
      check(fs > 0, $sformatf("Event Buffer full stalls: %0d", fs));
      check(as > 0, $sformatf("Size FIFO almost-full stalls: %0d", as));
    end
    $display("mechanisms: bp_stalls=%0d occ_max=%0d wait=%0d pending_max=%0d b2b=%0d words=%0d",
             bp_stalls, occ_max, wait_cycles, pending_max, back_to_back, words_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
