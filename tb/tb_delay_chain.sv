// tb_delay_chain - drives random values into both directions of a 4-stage
// chain and checks that every output equals its input exactly DEPTH cycles
// earlier (and that the 1-bit strobes are low right after reset).
module tb_delay_chain;
  localparam int D = 4, DW = 64, SW = 12;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic rd_ack_in = 0, rd_ack_out, afull_in = 0, afull_out, size_wr_in = 0, size_wr_out;
  logic [DW-1:0] data_in = '0, data_out;
  logic [SW-1:0] size_in = '0, size_out;
  int checks = 0, failures = 0;
  typedef struct packed { logic a; logic f; logic s; logic [DW-1:0] d; logic [SW-1:0] z; } v_t;
  v_t hist [int];

  delay_chain dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_ack_in = 1; afull_in = 1; size_wr_in = 1;   // must not leak through reset
    repeat (D + 2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (rd_ack_out || afull_out || size_wr_out) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    rd_ack_in = 0; afull_in = 0; size_wr_in = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (c >= D) begin
        v_t e;
        e = hist[c - D];
        checks++;
        if (rd_ack_out != e.a || afull_out != e.f || size_wr_out != e.s || data_out != e.d || size_out != e.z) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d", c);
        end
      end
      rd_ack_in = 1'($urandom); afull_in = 1'($urandom); size_wr_in = 1'($urandom);
      data_in = {$urandom, $urandom}; size_in = SW'($urandom);
      hist[c] = '{rd_ack_in, afull_in, size_wr_in, data_in, size_in};
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
