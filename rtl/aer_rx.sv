// aer_rx: AER input port of the bridge.
//
// An AER sender puts a neuron address on the bus and asserts Req; the
// receiver takes the address and answers with Ack; the sender then releases
// Req and the receiver releases Ack (4-phase, bundled data). The bus names
// Req, Ack and Address-Event are those of the AER link; the active-low
// polarity and the 4-phase protocol are this design's choice, being the usual
// convention for AER boards.
//
// Req is asynchronous to clk and goes through a two-flop synchroniser. When
// the synchronised Req is seen low the address is sampled (the sender must
// hold it stable while Req is low) and offered on ev_valid/ev_addr. Ack is
// only asserted once the word has been taken (ev_valid && ev_ready), so a
// full downstream stalls the sender instead of losing events.
//
// Timing: the address appears on ev_addr 3 clocks after Req falls; Ack falls
// the clock after the handshake with the downstream, and rises 3 clocks after
// Req rises. One event takes at least 7 clocks (7.1 Mevents/s at 50 MHz)
// when the sender answers each Ack edge at once.
module aer_rx #(
  parameter int AER_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // asynchronous AER bus
  input  logic             aer_req_n,
  input  logic [AER_W-1:0] aer_addr,
  output logic             aer_ack_n,
  // clocked event stream
  output logic             ev_valid,
  input  logic             ev_ready,
  output logic [AER_W-1:0] ev_addr
);

  typedef enum logic [1:0] {
    S_IDLE,   // waiting for Req
    S_OFFER,  // address held on ev_addr until taken
    S_ACK     // Ack asserted, waiting for Req release
  } state_e;

  state_e     state;
  logic [1:0] req_sync;  // req_sync[1] is the synchronised Req (active low)

  always_ff @(posedge clk) begin
    if (!rst_n) req_sync <= 2'b11;
    else        req_sync <= {req_sync[0], aer_req_n};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      aer_ack_n <= 1'b1;
      ev_addr   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!req_sync[1]) begin
          ev_addr <= aer_addr;
          state   <= S_OFFER;
        end
        S_OFFER: if (ev_ready) begin
          aer_ack_n <= 1'b0;
          state     <= S_ACK;
        end
        S_ACK: if (req_sync[1]) begin
          aer_ack_n <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ev_valid = (state == S_OFFER);

  // An offered event stays put until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      ev_valid && !ev_ready |=> ev_valid && $stable(ev_addr);
  endproperty
  a_hold: assert property (p_hold);

endmodule
