// tb_readout_regs - register map: mask reset value, write/read back, status
// fields, and the occupancy maximum with its clear-on-write.
module tb_readout_regs;
  localparam int N = 10;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic reg_we = 0;
  logic [1:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata, events_sent = 0;
  logic [N-1:0] cb_mask;
  logic [7:0] pending = 0;
  logic l1a_overflow = 0, fifo_overflow = 0;
  logic [1:0] ctrl_state = 0;
  logic [3:0] bp_occupancy = 0;
  int checks = 0, failures = 0;

  readout_regs dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input logic [1:0] a, output logic [31:0] r);
    reg_addr = a;
    #0.2;
    r = reg_rdata;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    chk(cb_mask == '1, "mask reset to all ones");
    for (int k = 0; k < 20; k++) begin
      logic [N-1:0] m;
      m = N'($urandom);
      wr(2'd0, 32'(m) | 32'hFFFF_FC00);
      chk(cb_mask == m, "mask output");
      rd(2'd0, r);
      chk(r == 32'(m), "mask read back");
    end
    events_sent = 32'd12345; pending = 8'd7; fifo_overflow = 1; ctrl_state = 2'd2;
    rd(2'd1, r);
    chk(r == 32'd12345, "events sent");
    rd(2'd2, r);
    chk(r == 32'h0000_0907, "status");
    @(negedge clk) bp_occupancy = 4'd5;
    @(negedge clk) bp_occupancy = 4'd9;
    @(negedge clk) bp_occupancy = 4'd2;
    @(negedge clk);
    rd(2'd3, r);
    chk(r == 32'd9, "occupancy maximum");
    wr(2'd3, 0);
    @(negedge clk);
    rd(2'd3, r);
    chk(r == 32'd2, "occupancy cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
