// tb_size_fifo - Size FIFO against a queue model at its default size
// (32 entries, almost full 8 entries early). Checks order, empty, the
// almost-full threshold every cycle, and the sticky overflow flag after a
// deliberate write to a full FIFO.
module tb_size_fifo;
  localparam int W = 12, D = 32, M = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic wr_en = 0, rd_en = 0, empty, afull, overflow;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0, afulls = 0;
  logic [W-1:0] q[$];

  size_fifo dut (.*);

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
    for (int c = 0; c < 4000; c++) begin
      bit fill_phase, acc_w, acc_r;
      @(negedge clk);
      chk(empty == (q.size() == 0), $sformatf("empty c=%0d", c));
      chk(afull == (q.size() >= D - M), $sformatf("afull c=%0d size=%0d", c, q.size()));
      if (q.size() != 0) chk(rd_data == q[0], $sformatf("data c=%0d", c));
      chk(!overflow, "overflow flag");
      if (afull) afulls++;
      fill_phase = ((c / 150) % 2) == 0;
      // writes stop at full, as a capture block does when it honours afull
      wr_en   = (q.size() < D) && ($urandom_range(9) < (fill_phase ? 8 : 3));
      wr_data = W'($urandom);
      rd_en   = !empty && ($urandom_range(9) < (fill_phase ? 2 : 8));
      acc_w = wr_en;
      acc_r = rd_en;
      @(posedge clk);
      if (acc_r) void'(q.pop_front());
      if (acc_w) q.push_back(wr_data);
    end
    chk(afulls > 0, "almost full reached");
    // overflow: fill completely, then one more write
    @(negedge clk); rd_en = 0; wr_en = 1;
    while (q.size() < D) begin @(posedge clk); q.push_back(wr_data); @(negedge clk); end
    @(posedge clk);          // write to the full FIFO, dropped
    @(negedge clk); wr_en = 0;
    chk(overflow, "overflow flag set");
    chk(rd_data == q[0], "contents kept after overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
