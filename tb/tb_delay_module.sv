// tb_delay_module - random control words through the default 8-cycle delay
// (twice a 4-stage chain); the output must equal the input 8 cycles earlier.
module tb_delay_module;
  localparam int W = 7, DLY = 8;
  logic clk = 0;
  always #1 clk = ~clk;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] hist [int];
  int checks = 0, failures = 0;

  delay_module dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (c >= DLY) begin
        checks++;
        if (dout != hist[c - DLY]) begin failures++; if (failures < 10) $display("FAIL c=%0d", c); end
      end
      din = W'($urandom);
      hist[c] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
