// readout_pkg - types and constants shared by the readout circuit.
//
// The readout circuit merges the sub-packets that up to ten capture blocks
// produce for one Level-1 Accept (L1A) into a single stream for an SLink
// output. The default sizes below are the 64-bit configuration: 10 capture
// blocks per readout circuit, 64-bit words, 12-bit sub-packet lengths.
// The pipeline depth of the capture-block delay chain is this design's own
// choice (the architecture only expects it to stay below 8 stages).
package readout_pkg;

  parameter int unsigned N_CB_DEF       = 10;  // capture blocks per readout
  parameter int unsigned DATA_W_DEF     = 64;  // 64 at 380 MHz, or 128 at 190 MHz
  parameter int unsigned SIZE_W_DEF     = 12;  // sub-packet length field
  parameter int unsigned PIPE_DEPTH_DEF = 4;   // delay-chain stages per direction
  parameter int unsigned EVT_DEPTH_DEF  = 4096; // Event Buffer words
  parameter int unsigned SIZE_DEPTH_DEF = 32;   // Size FIFO entries
  parameter int unsigned PTR_W          = 4;    // enough for up to 16 capture blocks

  // Per-word control issued by the controller together with a read
  // acknowledgement; delayed by the delay module to meet the returning data.
  typedef struct packed {
    logic             valid;  // a word was requested
    logic [PTR_W-1:0] sel;    // capture block pointer
    logic             sop;    // first word of the event packet
    logic             eop;    // last word of the event packet
  } word_ctrl_t;

  localparam int unsigned CTRL_W = $bits(word_ctrl_t);

  // Controller states (flowchart of the readout controller)
  typedef enum logic [1:0] {
    ST_IDLE      = 2'd0,  // wait for an L1A
    ST_WAIT_SIZE = 2'd1,  // wait until the pointed block has a sub-packet
    ST_READ      = 2'd2   // issue one acknowledgement per cycle
  } ctrl_state_t;

endpackage
