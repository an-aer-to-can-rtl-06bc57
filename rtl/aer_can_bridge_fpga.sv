// aer_can_bridge_fpga: FPGA side of an AER-to-CAN bridge for a robot arm.
//
// Spiking (AER) vision and control hardware and a commercial robot arm
// speak different languages: the first sends streams of address events, the
// second takes CAN messages from a computer. The bridge places an FPGA
// between the AER buses and an embedded computer; the computer owns the CAN
// controller and builds or reads the CAN messages. This module is the
// FPGA's logic. Its DMA ports go to the computer, which is not part of it.
//
//   AER in -> aer_rx -+-> timestamp_packer -> event_fifo -+-> DMA out
//                     |                                   |
//                     +-> spike_counter ------------------+
//   DMA in -> spike_gen -> aer_tx -> AER out
//
// mode selects what the computer receives (aer_pkg::dma_mode_e):
//   MODE_RAW   every event as {timestamp, address}, so the computer can work
//              on spikes itself;
//   MODE_FUSED events only feed spike_counter, which sends one count word
//              per motor node every 320 us window (spike-to-digital).
// Words still in the FIFO after a switch to MODE_FUSED leave first; count
// words are discarded while in MODE_RAW. In MODE_RAW a full FIFO holds off
// the AER sender's Ack (no event is lost); MODE_FUSED never stalls it.
// The two modes, 16-bit events and stamps, six nodes and the 320 us interval
// follow the published design; the valid/ready DMA ports, the mode pin and
// the word tags are this design's choices.
module aer_can_bridge_fpga
  import aer_pkg::*;
#(
  parameter int AER_W      = AER_ADDR_W,
  parameter int NODES      = NUM_NODES,
  parameter int FIFO_DEPTH = 512,
  parameter int WINDOW_US  = 320,
  parameter int CLK_MHZ    = 50
) (
  input  logic             clk,
  input  logic             rst_n,
  input  dma_mode_e        mode,
  // AER input bus (from the spiking processing layer)
  input  logic             aer_in_req_n,
  input  logic [AER_W-1:0] aer_in_addr,
  output logic             aer_in_ack_n,
  // AER output bus (spikes made from robot sensor values)
  output logic             aer_out_req_n,
  output logic [AER_W-1:0] aer_out_addr,
  input  logic             aer_out_ack_n,
  // DMA to the embedded computer
  output logic             dma_out_valid,
  input  logic             dma_out_ready,
  output logic [31:0]      dma_out_data,
  // DMA from the embedded computer (rate words)
  input  logic             dma_in_valid,
  input  logic [31:0]      dma_in_data,
  // status
  output logic [TS_W-1:0]  ts_now,        // current timestamp (1 us ticks)
  output logic [$clog2(FIFO_DEPTH):0] fifo_count,  // raw words waiting
  output logic             window_done,   // count window ended this clock
  output logic             spike_dropped  // an output spike was lost
);

  // AER input
  logic             rx_valid, rx_ready;
  logic [AER_W-1:0] rx_addr;

  aer_rx #(.AER_W(AER_W)) u_rx (
    .clk, .rst_n,
    .aer_req_n(aer_in_req_n), .aer_addr(aer_in_addr), .aer_ack_n(aer_in_ack_n),
    .ev_valid(rx_valid), .ev_ready(rx_ready), .ev_addr(rx_addr)
  );

  // Raw path
  logic              pk_in_ready, pk_valid, pk_ready;
  logic [31:0]       pk_data;
  logic              fifo_valid, fifo_ready;
  logic [31:0]       fifo_data;

  timestamp_packer #(.AER_W(AER_W), .TS_W(TS_W), .TICK_CYCLES(CLK_MHZ)) u_pack (
    .clk, .rst_n,
    .in_valid(rx_valid && mode == MODE_RAW), .in_ready(pk_in_ready), .in_addr(rx_addr),
    .out_valid(pk_valid), .out_ready(pk_ready), .out_data(pk_data), .ts_now
  );

  event_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(pk_valid), .wr_ready(pk_ready), .wr_data(pk_data),
    .rd_valid(fifo_valid), .rd_ready(fifo_ready), .rd_data(fifo_data),
    .count(fifo_count)
  );

  // Fused path
  logic        sc_ev_ready, sc_valid, sc_ready;
  logic [31:0] sc_data;

  spike_counter #(.AER_W(AER_W), .NODES(NODES), .WINDOW_US(WINDOW_US),
                  .CLK_MHZ(CLK_MHZ)) u_count (
    .clk, .rst_n,
    .ev_valid(rx_valid && mode == MODE_FUSED), .ev_ready(sc_ev_ready), .ev_addr(rx_addr),
    .out_valid(sc_valid), .out_ready(sc_ready), .out_data(sc_data),
    .window_done
  );

  assign rx_ready = (mode == MODE_RAW) ? pk_in_ready : sc_ev_ready;

  // DMA out: FIFO words first, count words only in the fused mode.
  assign dma_out_valid = fifo_valid || (mode == MODE_FUSED && sc_valid);
  assign dma_out_data  = fifo_valid ? fifo_data : sc_data;
  assign fifo_ready    = dma_out_ready;
  assign sc_ready      = (mode == MODE_RAW) || (!fifo_valid && dma_out_ready);

  // Output path
  logic             sg_valid, sg_ready;
  logic [AER_W-1:0] sg_addr;

  spike_gen #(.AER_W(AER_W), .NODES(NODES)) u_gen (
    .clk, .rst_n,
    .cfg_valid(dma_in_valid), .cfg_data(dma_in_data),
    .ev_valid(sg_valid), .ev_ready(sg_ready), .ev_addr(sg_addr),
    .dropped(spike_dropped)
  );

  aer_tx #(.AER_W(AER_W)) u_tx (
    .clk, .rst_n,
    .ev_valid(sg_valid), .ev_ready(sg_ready), .ev_addr(sg_addr),
    .aer_req_n(aer_out_req_n), .aer_addr(aer_out_addr), .aer_ack_n(aer_out_ack_n)
  );

endmodule
