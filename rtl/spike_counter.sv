// spike_counter: spike-to-digital conversion for the fused mode.
//
// In the fused mode the bridge does not forward every spike to the embedded
// computer; it turns the spike streams aimed at the arm's motor nodes into
// numbers the computer can put straight into CAN commands. The published
// design fixes the six nodes and the 320 us update interval (the shortest
// time between two CAN motor commands), during which some 320 events at a
// 1 us spike interval can arrive. How the spikes are fused is not given;
// this block does the simplest conversion, a per-node event count over one
// interval.
//
// The node of an event is its address bits 2:0 (this design's mapping);
// addresses whose node field is NODES or more are ignored. Every
// WINDOW_US*CLK_MHZ clocks the counts are copied to a shadow set and cleared
// (an event in that very clock already counts in the new window), then one
// word per node, {8'hC0, 5'b0, node, count}, is offered in node order on
// out_valid/out_data. Counts saturate at 2^CNT_W-1. A window that ends
// before the previous words have all gone overwrites them. ev_ready is
// always high.
module spike_counter
  import aer_pkg::*;
#(
  parameter int AER_W     = AER_ADDR_W,
  parameter int NODES     = NUM_NODES,
  parameter int WINDOW_US = 320,
  parameter int CLK_MHZ   = 50,
  parameter int CNT_W     = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ev_valid,
  output logic             ev_ready,
  input  logic [AER_W-1:0] ev_addr,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [31:0]      out_data,
  output logic             window_done
);

  localparam int WIN_CYCLES = WINDOW_US * CLK_MHZ;
  localparam int WIN_W      = $clog2(WIN_CYCLES);

  logic [WIN_W-1:0]  win_cnt;
  logic [CNT_W-1:0]  cnt  [NODES];
  logic [CNT_W-1:0]  snap [NODES];
  logic [NODE_W-1:0] ev_node, send_idx;
  node_word_t        word;

  assign ev_ready    = 1'b1;
  assign ev_node     = ev_addr[NODE_W-1:0];
  assign window_done = (win_cnt == WIN_W'(WIN_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)           win_cnt <= '0;
    else if (window_done) win_cnt <= '0;
    else                  win_cnt <= win_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NODES; n++) begin
        cnt[n]  <= '0;
        snap[n] <= '0;
      end
      out_valid <= 1'b0;
      send_idx  <= '0;
    end else begin
      for (int n = 0; n < NODES; n++) begin
        if (window_done) begin
          snap[n] <= cnt[n];
          cnt[n]  <= (ev_valid && ev_node == NODE_W'(n)) ? CNT_W'(1) : '0;
        end else if (ev_valid && ev_node == NODE_W'(n) && cnt[n] != '1) begin
          cnt[n] <= cnt[n] + 1'b1;
        end
      end
      if (window_done) begin
        out_valid <= 1'b1;
        send_idx  <= '0;
      end else if (out_valid && out_ready) begin
        if (send_idx == NODE_W'(NODES - 1)) out_valid <= 1'b0;
        else                                send_idx  <= send_idx + 1'b1;
      end
    end
  end

  always_comb begin
    word.tag   = TAG_COUNT;
    word.zero  = '0;
    word.node  = send_idx;
    word.value = 16'(snap[send_idx]);
  end
  assign out_data = word;

endmodule
