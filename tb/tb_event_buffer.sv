// tb_event_buffer - random write/acknowledge traffic against a queue model.
// A 16-entry buffer is filled to full and drained to empty repeatedly; the
// head word, full and empty are compared with the model every cycle.
module tb_event_buffer;
  localparam int W = 64, D = 16;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic wr_en = 0, rd_ack = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0, fulls = 0;
  logic [W-1:0] q[$];

  event_buffer #(.W(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 6000; c++) begin
      bit fill_phase;
      @(negedge clk);
      // compare with model
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) ||
          (q.size() != 0 && rd_data != q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d size=%0d empty=%b full=%b %h", c, q.size(), empty, full, rd_data);
      end
      if (full) fulls++;
      fill_phase = ((c / 200) % 2) == 0;
      wr_en   = $urandom_range(9) < (fill_phase ? 8 : 3);
      wr_data = {$urandom, $urandom};
      rd_ack  = !empty && ($urandom_range(9) < (fill_phase ? 3 : 8));
      begin
        bit acc_w, acc_r;
        acc_w = wr_en && q.size() < D;
        acc_r = rd_ack && q.size() != 0;
        @(posedge clk);
        if (acc_r) void'(q.pop_front());
        if (acc_w) q.push_back(wr_data);
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
