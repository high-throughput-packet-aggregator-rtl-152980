// depth_harness - one readout circuit at a given delay-chain depth with its
// capture block emulators, random lengths, random triggers and random SLink
// backpressure, and a checker of the output stream. Used by tb_pipe_depth
// to run the same traffic at several depths. Reports its check counts and
// the peak backpressure FIFO occupancy when done is raised.
module depth_harness #(
  parameter int PIPE_DEPTH = 4,
  parameter int N          = 3,
  parameter int EVENTS     = 60
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   occ_peak,
  output int   bp_stalls
);
  localparam int DW = 64, SW = 12;

  logic          evt_wr_en [N], evt_full [N], size_wr_en [N], size_afull [N];
  logic [DW-1:0] evt_wr_data [N];
  logic [SW-1:0] size_wr_data [N];
  logic [SW-1:0] len [N];
  logic          l1a = 0, slink_bp = 0;
  logic [31:0]   reg_rdata;
  logic [DW-1:0] slink_data;
  logic          slink_valid, slink_sop, slink_eop;
  int            fs [N], as [N];

  readout_circuit #(.N_CB(N), .PIPE_DEPTH(PIPE_DEPTH)) dut (
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
  int   ev_no = 0;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL depth %0d: %s", PIPE_DEPTH, s); end
  endtask

  always @(posedge clk) begin
    slink_bp <= slink_bp ? ($urandom_range(3) != 0) : ($urandom_range(5) == 0);
    if (rst_n) begin
      if (int'(dut.u_bp_fifo.count) > occ_peak) occ_peak <= int'(dut.u_bp_fifo.count);
      if (slink_valid && slink_bp) bp_stalls <= bp_stalls + 1;
      if (slink_valid && !slink_bp) begin
        if (exp_q.size() == 0) chk(0, "unexpected word");
        else begin
          exp_t e;
          e = exp_q.pop_front();
          chk({slink_sop, slink_eop, slink_data} == e, "stream word");
        end
      end
    end
  end

  initial begin
    checks = 0; failures = 0; occ_peak = 0; bp_stalls = 0; done = 0;
    for (int i = 0; i < N; i++) len[i] = 1;
    @(posedge rst_n);
    repeat (4 * PIPE_DEPTH) @(posedge clk);
    repeat (EVENTS) begin
      for (int i = 0; i < N; i++) begin
        len[i] = SW'($urandom_range(30, 1));
        for (int w = 0; w < int'(len[i]); w++) begin
          logic [63:0] d;
          d = {8'(i), 24'(ev_no), 32'(w)};
          exp_q.push_back({1'(i == 0 && w == 0), 1'(i == N-1 && w == int'(len[i])-1), d});
        end
      end
      ev_no++;
      @(posedge clk) l1a <= 1;
      @(posedge clk) l1a <= 0;
      @(posedge clk);
      repeat ($urandom_range(80, 5)) @(posedge clk);
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);
    done = 1;
  end
endmodule
