// aer_tx: AER output port of the bridge.
//
// Takes one address at a time from the clocked logic and sends it to an AER
// receiver with a 4-phase, active-low Req/Ack handshake (bundled data): the
// address is driven, Req falls one clock later so the address has settled,
// the receiver answers with Ack low, Req rises, and the port waits for Ack to
// rise again before it accepts the next address. The AER bus and its Req and
// Ack lines are those of the published bridge; polarity, the one-clock setup
// and the synchroniser are this design's choices.
//
// Ack is asynchronous and passes through a two-flop synchroniser. ev_ready
// is high only in the idle state, so an address is taken in one clock and
// the next one waits for the whole handshake to finish.
module aer_tx #(
  parameter int AER_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // clocked event stream
  input  logic             ev_valid,
  output logic             ev_ready,
  input  logic [AER_W-1:0] ev_addr,
  // asynchronous AER bus
  output logic             aer_req_n,
  output logic [AER_W-1:0] aer_addr,
  input  logic             aer_ack_n
);

  typedef enum logic [1:0] {
    S_IDLE,   // ready for an address
    S_SETUP,  // address on the bus, Req not yet asserted
    S_REQ,    // Req asserted, waiting for Ack
    S_REL     // Req released, waiting for Ack release
  } state_e;

  state_e     state;
  logic [1:0] ack_sync;  // ack_sync[1] is the synchronised Ack (active low)

  always_ff @(posedge clk) begin
    if (!rst_n) ack_sync <= 2'b11;
    else        ack_sync <= {ack_sync[0], aer_ack_n};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      aer_req_n <= 1'b1;
      aer_addr  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ev_valid) begin
          aer_addr <= ev_addr;
          state    <= S_SETUP;
        end
        S_SETUP: begin
          aer_req_n <= 1'b0;
          state     <= S_REQ;
        end
        S_REQ: if (!ack_sync[1]) begin
          aer_req_n <= 1'b1;
          state     <= S_REL;
        end
        S_REL: if (ack_sync[1]) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ev_ready = (state == S_IDLE);

  // The address may not change while Req is asserted.
  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    !aer_req_n |=> $stable(aer_addr));

endmodule
