// tb_pipe_depth - the readout circuit is independent of the delay-chain
// depth: the same RTL, with only PIPE_DEPTH changed, is run at depths 2, 5
// and 7 (the architecture expects fewer than 8 stages) under random
// triggers, lengths and backpressure. At each depth every word must arrive
// intact and in order, and the backpressure FIFO must peak at exactly its
// depth 2 x PIPE_DEPTH + 1 without overflowing.
module tb_pipe_depth;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  localparam int ND = 3;
  localparam int DEPTHS [ND] = '{2, 5, 7};
  logic done [ND];
  int   hc [ND], hf [ND], peak [ND], stalls [ND];
  int   checks = 0, failures = 0;

  for (genvar k = 0; k < ND; k++) begin : g_d
    depth_harness #(.PIPE_DEPTH(DEPTHS[k])) u_h (
      .clk, .rst_n, .done(done[k]), .checks(hc[k]), .failures(hf[k]),
      .occ_peak(peak[k]), .bp_stalls(stalls[k])
    );
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    for (int k = 0; k < ND; k++) begin
      $display("depth %0d: %0d words checked, %0d failures, FIFO peak %0d, %0d stall cycles",
               DEPTHS[k], hc[k], hf[k], peak[k], stalls[k]);
      checks += hc[k];
      failures += hf[k];
      checks++;
      if (peak[k] != 2 * DEPTHS[k] + 1) begin
        failures++;
        $display("FAIL: depth %0d FIFO peak %0d", DEPTHS[k], peak[k]);
      end
      checks++;
      if (hc[k] == 0 || stalls[k] == 0) begin failures++; $display("FAIL: depth %0d idle", DEPTHS[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
