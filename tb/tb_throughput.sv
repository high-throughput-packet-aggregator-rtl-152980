// tb_throughput - throughput against L1A rate, as in the hardware test.
//
// Ten capture block emulators each produce 50 words per L1A (500 64-bit
// words per event) and the readout circuit runs at its default size. The
// clock is taken as 380 MHz, so an L1A rate f means a trigger every
// 380e6/f cycles (fractional periods are spread with an accumulator). For
// f = 100 kHz ... 1 MHz the delivered words are counted over a steady-state
// window of 40 trigger periods and converted to Gb/s. Expected:
// min(f x 500 x 64 bit, 380e6 x 64 bit = 24.32 Gb/s), within 2 %; in
// particular 750 kHz must give 24.0 Gb/s. Every word is also checked
// against the reference stream. No backpressure is applied.
module tb_throughput;
  import readout_pkg::*;

  localparam int  N = N_CB_DEF, DW = DATA_W_DEF, SW = SIZE_W_DEF;
  localparam real FCLK = 380.0e6;
  localparam int  WORDS_PER_CB = 50;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic          evt_wr_en [N], evt_full [N], size_wr_en [N], size_afull [N];
  logic [DW-1:0] evt_wr_data [N];
  logic [SW-1:0] size_wr_data [N];
  logic [SW-1:0] len [N];
  logic          l1a = 0;
  logic [31:0]   reg_rdata;
  logic [DW-1:0] slink_data;
  logic          slink_valid, slink_sop, slink_eop;
  int            fs [N], as [N];

  readout_circuit dut (
    .clk, .rst_n,
    .cb_evt_wr_en(evt_wr_en), .cb_evt_wr_data(evt_wr_data), .cb_evt_full(evt_full),
    .cb_size_wr_en(size_wr_en), .cb_size_wr_data(size_wr_data), .cb_size_afull(size_afull),
    .l1a, .reg_we(1'b0), .reg_addr(2'd0), .reg_wdata(32'd0), .reg_rdata,
    .slink_data, .slink_valid, .slink_sop, .slink_eop, .slink_bp(1'b0)
  );

  for (genvar i = 0; i < N; i++) begin : g_emu
    assign len[i] = SW'(WORDS_PER_CB);
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

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(posedge clk) if (rst_n && slink_valid) begin
    words_rx++;
    if (exp_q.size() == 0) chk(0, "unexpected word");
    else begin
      exp_t e;
      e = exp_q.pop_front();
      chk({slink_sop, slink_eop, slink_data} == e, $sformatf("word %0d", words_rx));
    end
  end

  task automatic fire();
    for (int i = 0; i < N; i++)
      for (int w = 0; w < WORDS_PER_CB; w++) begin
        logic [63:0] d;
        d = {8'(i), 24'(ev_no), 32'(w)};
        exp_q.push_back({1'(i == 0 && w == 0), 1'(i == N-1 && w == WORDS_PER_CB-1), DW'(d)});
      end
    ev_no++;
    l1a <= 1;
    @(posedge clk) l1a <= 0;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real freqs [5];
    freqs = '{100.0e3, 250.0e3, 500.0e3, 750.0e3, 1.0e6};
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    foreach (freqs[k]) begin
      real period, acc, gbps, expect_gbps;
      int  w0, w1, c0, c1, cyc;
      period = FCLK / freqs[k];
      acc = 0.0;
      cyc = 0;
      w0 = 0; c0 = 0;
      for (int t = 0; t < 60; t++) begin
        if (t == 10) begin w0 = words_rx; c0 = cyc; end
        if (t == 50) begin w1 = words_rx; c1 = cyc; end
        @(posedge clk);
        cyc++;
        fire();
        cyc++;
        acc += period;
        while (real'(cyc) < acc) begin @(posedge clk); cyc++; end
      end
      gbps = real'(w1 - w0) * DW * FCLK / real'(c1 - c0) / 1.0e9;
      expect_gbps = freqs[k] * 500.0 * DW / 1.0e9;
      if (expect_gbps > FCLK * DW / 1.0e9) expect_gbps = FCLK * DW / 1.0e9;
      $display("L1A %7.0f Hz: %6.2f Gb/s (expected %6.2f)", freqs[k], gbps, expect_gbps);
      chk(gbps > 0.98 * expect_gbps && gbps < 1.02 * expect_gbps,
          $sformatf("throughput at %0.0f Hz", freqs[k]));
      if (freqs[k] == 750.0e3) chk(gbps >= 23.5, "24 Gb/s at the nominal 750 kHz");
      // let the backlog drain before the next rate
      while (exp_q.size() != 0) @(posedge clk);
      repeat (50) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
