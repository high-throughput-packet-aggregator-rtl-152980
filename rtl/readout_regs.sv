// readout_regs - software-accessible registers of the readout circuit.
//
// Software chooses which capture blocks this readout circuit reads by
// writing the capture block mask; giving each capture block to exactly one
// readout circuit is left to software. The block also exposes status for
// monitoring. The register port is a plain synchronous bus standing in for
// the IPBus slave of the real system:
//   addr 0  RW  capture block mask (bit i enables capture block i), reset all ones
//   addr 1  RO  events sent
//   addr 2  RO  {controller state[1:0], sticky trigger overflow,
//               sticky FIFO overflow, pending triggers[PEND_W-1:0]}
//   addr 3  RO  highest backpressure FIFO occupancy seen (write clears it)
// A write takes effect at the next clock edge; reg_rdata is combinational
// from reg_addr. The register map is this design's own.
module readout_regs #(
  parameter int unsigned N_CB   = 10,
  parameter int unsigned PEND_W = 8,
  parameter int unsigned OCC_W  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_we,
  input  logic [1:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  output logic [N_CB-1:0]   cb_mask,
  input  logic [31:0]       events_sent,
  input  logic [PEND_W-1:0] pending,
  input  logic              l1a_overflow,
  input  logic              fifo_overflow,
  input  logic [1:0]        ctrl_state,
  input  logic [OCC_W-1:0]  bp_occupancy
);
  logic [OCC_W-1:0] occ_max;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cb_mask <= '1;
      occ_max <= '0;
    end else begin
      if (reg_we && reg_addr == 2'd0) cb_mask <= reg_wdata[N_CB-1:0];
      if (reg_we && reg_addr == 2'd3) occ_max <= '0;
      else if (bp_occupancy > occ_max) occ_max <= bp_occupancy;
    end
  end

  always_comb begin
    unique case (reg_addr)
      2'd0: reg_rdata = 32'(cb_mask);
      2'd1: reg_rdata = events_sent;
      2'd2: reg_rdata = 32'({ctrl_state, l1a_overflow, fifo_overflow, pending});
      default: reg_rdata = 32'(occ_max);
    endcase
  end
endmodule
