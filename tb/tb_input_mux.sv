// tb_input_mux - random inputs and pointers for the 10-input, 64-bit mux,
// including out-of-range pointers, which must give zero.
module tb_input_mux;
  localparam int N = 10, W = 64, SW = 4;
  logic [SW-1:0] sel;
  logic [W-1:0] din [N];
  logic [W-1:0] dout;
  int checks = 0, failures = 0;

  input_mux dut (.*);

  initial begin
    for (int c = 0; c < 2000; c++) begin
      logic [W-1:0] e;
      for (int i = 0; i < N; i++) din[i] = {$urandom, $urandom};
      sel = SW'($urandom);
      #1;
      e = (int'(sel) < N) ? din[sel] : '0;
      checks++;
      if (dout !== e) begin failures++; if (failures < 10) $display("FAIL sel=%0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
