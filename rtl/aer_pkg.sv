// aer_pkg: widths, word formats and modes shared by the FPGA side of the
// AER-to-CAN bridge.
//
// The bridge moves address events (AER) between spiking hardware and an
// embedded computer that talks to the robot over CAN. Events are 16-bit
// addresses and are time-stamped with 16-bit stamps, so one raw event fills
// one 32-bit DMA word; the arm has six CAN motor nodes. Those three numbers
// follow the published design. The tag bytes that mark the other DMA word
// types, and the node field position, are this design's own choice.
package aer_pkg;

  localparam int AER_ADDR_W = 16;  // AER address width
  localparam int TS_W       = 16;  // timestamp width
  localparam int NUM_NODES  = 6;   // motor nodes on the arm's CAN bus
  localparam int NODE_W     = 3;   // node index width

  // Tag in bits 31:24 of the non-raw DMA words.
  localparam logic [7:0] TAG_COUNT = 8'hC0;  // FPGA -> computer: node spike count
  localparam logic [7:0] TAG_RATE  = 8'hA0;  // computer -> FPGA: node spike rate

  // Source of the words sent to the computer.
  typedef enum logic {
    MODE_RAW   = 1'b0,  // every event with its timestamp
    MODE_FUSED = 1'b1   // one spike count per node per window
  } dma_mode_e;

  // Count word: {TAG_COUNT, 5'b0, node, count}.
  typedef struct packed {
    logic [7:0]        tag;
    logic [4:0]        zero;
    logic [NODE_W-1:0] node;
    logic [15:0]       value;
  } node_word_t;

  // Raw event word: {timestamp, address}.
  typedef struct packed {
    logic [TS_W-1:0]  ts;
    logic [AER_ADDR_W-1:0] addr;
  } ts_event_t;

endpackage
