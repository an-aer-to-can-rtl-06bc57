// timestamp_packer: attaches a timestamp to every AER event.
//
// In the raw mode of the bridge the embedded computer receives each event
// together with the time it arrived, so that it can keep working with spikes.
// Following the published design, an event is a 16-bit address and its stamp
// is 16 bits, and the two are packed into one 32-bit DMA word:
// out_data = {timestamp, address}.
//
// The timestamp is a free-running counter that advances once every
// TICK_CYCLES clocks (50 clocks = 1 us at 50 MHz; the tick length is this
// design's choice) and wraps without a marker. The word is built in one
// output register: an event accepted in clock n carries the stamp of clock n
// and is on out_data from clock n+1. in_ready = !out_valid || out_ready, so
// the packer runs at one event per clock when the downstream keeps up.
module timestamp_packer #(
  parameter int AER_W       = 16,
  parameter int TS_W        = 16,
  parameter int TICK_CYCLES = 50
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [AER_W-1:0]      in_addr,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [TS_W+AER_W-1:0] out_data,
  output logic [TS_W-1:0]       ts_now
);

  localparam int PRE_W = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;

  logic [PRE_W-1:0] pre;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pre    <= '0;
      ts_now <= '0;
    end else if (pre == PRE_W'(TICK_CYCLES - 1)) begin
      pre    <= '0;
      ts_now <= ts_now + 1'b1;
    end else begin
      pre <= pre + 1'b1;
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= {ts_now, in_addr};
    end
  end

endmodule
