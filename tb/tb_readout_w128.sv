// tb_readout_w128 - the 128-bit configuration (DATA_W = 128, clock taken as
// 190 MHz), which must give the same 24 Gb/s as the 64-bit one at 380 MHz.
//
// Ten capture block emulators, 25 words of 128 bits each per L1A (the same
// 500 x 64 bits per event as the 64-bit test). Part 1: L1A at 750 kHz and
// 1 MHz without backpressure; the delivered rate over 40 trigger periods
// must be min(f x 32 kbit, 190e6 x 128 bit = 24.32 Gb/s) within 2 %.
// Part 2: random lengths under random backpressure. Every word and its
// first/last flags are compared with the reference stream.
module tb_readout_w128;
  localparam int  N = 10, DW = 128, SW = 12;
  localparam real FCLK = 190.0e6;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic          evt_wr_en [N], evt_full [N], size_wr_en [N], size_afull [N];
  logic [DW-1:0] evt_wr_data [N];
  logic [SW-1:0] size_wr_data [N];
  logic [SW-1:0] len [N];
  logic          l1a = 0, slink_bp = 0;
  logic [31:0]   reg_rdata;
  logic [DW-1:0] slink_data;
  logic          slink_valid, slink_sop, slink_eop;
  int            fs [N], as [N];
  int            bp_mode = 0, bp_stalls = 0;

  readout_circuit #(.DATA_W(DW)) dut (
    .clk, .rst_n,
    .cb_evt_wr_en(evt_wr_en), .cb_evt_wr_data(evt_wr_data), .cb_evt_full(evt_full),
    .cb_size_wr_en(size_wr_en), .cb_size_wr_data(size_wr_data), .cb_size_afull(size_afull),
    .l1a, .reg_we(1'b0), .reg_addr(2'd0), .reg_wdata(32'd0), .reg_rdata,
    .slink_data, .slink_valid, .slink_sop, .slink_eop, .slink_bp
  );

  for (genvar i = 0; i < N; i++) begin : g_emu
    cb_emulator #(.CB_ID(i), .DATA_W(DW), .SIZE_W(SW)) u_emu (
      .clk, .rst_n, .enable(1'b1), .l1a, .pkt_len(len[i]), .gaps(1'b0),
      .evt_wr_en(evt_wr_en[i]), .evt_wr_data(evt_wr_data[i]), .evt_full(evt_full[i]),
      .size_wr_en(size_wr_en[i]), .size_wr_data(size_wr_data[i]), .size_afull(size_afull[i]),
      .full_stalls(fs[i]), .afull_stalls(as[i])
    );
  end

  typedef logic [DW+1:0] exp_t;
  exp_t exp_q[$];
  int   ev_no = 0, checks = 0, failures = 0, words_rx = 0;

  function automatic logic [DW-1:0] pattern(input int id, input int e, input int i);
    return {{8'(id) ^ 8'd1, 24'(e), 32'(i)}, {8'(id), 24'(e), 32'(i)}};
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(posedge clk) begin
    case (bp_mode)
      0: slink_bp <= 0;
      default: slink_bp <= slink_bp ? ($urandom_range(3) != 0) : ($urandom_range(5) == 0);
    endcase
    if (rst_n && slink_valid && slink_bp) bp_stalls++;
    if (rst_n && slink_valid && !slink_bp) begin
      words_rx++;
      if (exp_q.size() == 0) chk(0, "unexpected word");
      else begin
        exp_t e;
        e = exp_q.pop_front();
        chk({slink_sop, slink_eop, slink_data} == e, $sformatf("word %0d", words_rx));
      end
    end
  end

  task automatic fire();
    for (int i = 0; i < N; i++) begin
      for (int w = 0; w < int'(len[i]); w++)
        exp_q.push_back({1'(i == 0 && w == 0), 1'(i == N-1 && w == int'(len[i])-1), pattern(i, ev_no, w)});
    end
    ev_no++;
    l1a <= 1;
    @(posedge clk) l1a <= 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real freqs [2];
    freqs = '{750.0e3, 1.0e6};
    for (int i = 0; i < N; i++) len[i] = 25;
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    foreach (freqs[k]) begin
      real period, acc, gbps, expect_gbps;
      int  w0, w1, c0, c1, cyc;
      period = FCLK / freqs[k];
      acc = 0.0; cyc = 0; w0 = 0; w1 = 0; c0 = 0; c1 = 1;
      for (int t = 0; t < 60; t++) begin
        if (t == 10) begin w0 = words_rx; c0 = cyc; end
        if (t == 50) begin w1 = words_rx; c1 = cyc; end
        fire();
        cyc += 2;
        acc += period;
        while (real'(cyc) < acc) begin @(posedge clk); cyc++; end
      end
      gbps = real'(w1 - w0) * DW * FCLK / real'(c1 - c0) / 1.0e9;
      expect_gbps = freqs[k] * 500.0 * 64 / 1.0e9;
      if (expect_gbps > FCLK * DW / 1.0e9) expect_gbps = FCLK * DW / 1.0e9;
      $display("128-bit, L1A %7.0f Hz: %6.2f Gb/s (expected %6.2f)", freqs[k], gbps, expect_gbps);
      chk(gbps > 0.98 * expect_gbps && gbps < 1.02 * expect_gbps, $sformatf("throughput at %0.0f Hz", freqs[k]));
      while (exp_q.size() != 0) @(posedge clk);
      repeat (50) @(posedge clk);
    end
    bp_mode = 1;
    repeat (30) begin
      for (int i = 0; i < N; i++) len[i] = SW'($urandom_range(40, 1));
      fire();
      repeat ($urandom_range(200, 10)) @(posedge clk);
    end
    while (exp_q.size() != 0) @(posedge clk);
    chk(bp_stalls > 0, "backpressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
