// tb_bp_fifo - backpressure FIFO (default 9 entries) against a queue model.
// Phase 1: read enable is the negated random backpressure and a write
// arrives whenever one was requested 8 cycles earlier with backpressure low,
// as in the readout circuit: the FIFO must never overflow and must reach
// its full depth. Phase 2: writes every cycle with no backpressure pass
// through with one cycle of latency (the FIFO acts as a register).
module tb_bp_fifo;
  localparam int W = 66, D = 9, RT = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic wr_en = 0, rd_en = 0, empty, overflow;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, peak = 0;
  logic [W-1:0] q[$];
  logic [RT-1:0] inflight = '0;
  logic bp = 0;

  bp_fifo dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 5000; c++) begin
      bit req, acc_r, acc_w;
      @(negedge clk);
      chk(int'(count) == q.size(), $sformatf("count c=%0d %0d/%0d", c, count, q.size()));
      chk(empty == (q.size() == 0), "empty");
      if (q.size() != 0) chk(rd_data == q[0], $sformatf("data c=%0d", c));
      chk(!overflow, "overflow");
      if (q.size() > peak) peak = q.size();
      bp = bp ? ($urandom_range(3) != 0) : ($urandom_range(4) == 0);
      req = !bp;                         // the controller issues while bp is low
      wr_en = inflight[RT-1];
      wr_data = {$urandom, $urandom, 2'($urandom)};
      rd_en = !bp;
      acc_r = rd_en && q.size() != 0;
      acc_w = wr_en;
      @(posedge clk);
      inflight = {inflight[RT-2:0], req};
      if (acc_r) void'(q.pop_front());
      if (acc_w) q.push_back(wr_data);
    end
    chk(peak == D, $sformatf("peak occupancy %0d", peak));
    // register behaviour
    @(negedge clk); rd_en = 1;
    while (q.size() != 0) begin @(posedge clk); void'(q.pop_front()); @(negedge clk); end
    for (int c = 0; c < 50; c++) begin
      logic [W-1:0] d;
      d = {$urandom, $urandom, 2'($urandom)};
      wr_en = 1; wr_data = d;
      @(posedge clk);
      @(negedge clk);
      chk(!empty && rd_data == d && count == 1, "pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
