// spike_gen: digital-to-spike conversion for the AER output.
//
// The bridge also works the other way round: sensor values that the
// embedded computer reads from the robot over CAN are turned into spike
// streams for the AER system. The published design says so but not how;
// this block rate-codes them, as in the usual AER scheme where a value is
// carried by how often an address fires.
//
// The computer writes one rate per node with a word
// {8'hA0, 5'b0, node, rate[15:0]} on cfg_valid/cfg_data; other tags and
// nodes >= NODES are ignored. Every clock each node adds its rate to a
// phase accumulator of ACC_W bits; a carry out is one spike, so a node
// fires rate * f_clk / 2^ACC_W times a second (at 50 MHz and ACC_W = 24,
// about 2.98 spikes/s per unit of rate). A spike waits in a one-bit pending
// flag until the output takes it; pending spikes leave in round-robin node
// order as address ADDR_BASE + node. A carry on a node whose flag is still
// set is lost and reported on dropped. Rate coding, word layout, accumulator
// width and addresses are this design's choices.
module spike_gen
  import aer_pkg::*;
#(
  parameter int              AER_W     = AER_ADDR_W,
  parameter int              NODES     = NUM_NODES,
  parameter int              ACC_W     = 24,
  parameter int              RATE_W    = 16,
  parameter logic [15:0]     ADDR_BASE = 16'h0100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_valid,
  input  logic [31:0]      cfg_data,
  output logic             ev_valid,
  input  logic             ev_ready,
  output logic [AER_W-1:0] ev_addr,
  output logic             dropped
);

  node_word_t        cfg;
  logic [RATE_W-1:0] rate [NODES];
  logic [ACC_W-1:0]  acc  [NODES];
  logic [NODES-1:0]  carry, pending, take;
  logic [NODE_W-1:0] rr, pick;
  logic              found;

  assign cfg = node_word_t'(cfg_data);

  always_comb begin
    for (int n = 0; n < NODES; n++) begin
      automatic logic [ACC_W:0] sum = {1'b0, acc[n]} + (ACC_W+1)'(rate[n]);
      carry[n] = sum[ACC_W];
    end
  end

  // Round-robin choice of the next pending node, starting at rr.
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 0; k < NODES; k++) begin
      automatic int n = (int'(rr) + k) % NODES;
      if (!found && pending[n]) begin
        found = 1'b1;
        pick  = NODE_W'(n);
      end
    end
  end

  assign ev_valid = found;
  assign ev_addr  = AER_W'(ADDR_BASE) + AER_W'(pick);

  always_comb begin
    take = '0;
    if (ev_valid && ev_ready) take[pick] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NODES; n++) begin
        rate[n] <= '0;
        acc[n]  <= '0;
      end
      pending <= '0;
      rr      <= '0;
      dropped <= 1'b0;
    end else begin
      dropped <= 1'b0;
      for (int n = 0; n < NODES; n++) begin
        acc[n] <= acc[n] + ACC_W'(rate[n]);
        if (carry[n]) begin
          pending[n] <= 1'b1;
          if (pending[n] && !take[n]) dropped <= 1'b1;
        end else if (take[n]) begin
          pending[n] <= 1'b0;
        end
        if (cfg_valid && cfg.tag == TAG_RATE && cfg.node == NODE_W'(n))
          rate[n] <= RATE_W'(cfg.value);
      end
      if (ev_valid && ev_ready)
        rr <= (pick == NODE_W'(NODES - 1)) ? '0 : pick + 1'b1;
    end
  end

endmodule
