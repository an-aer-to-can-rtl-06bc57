# AER-to-CAN bridge: FPGA logic

Spiking neuromorphic hardware (retinas, convolution chips, spike-based
controllers) talks in *address events*: every spike of a neuron puts that
neuron's address on a parallel bus, with a Req/Ack handshake, and values are
carried by how often an address fires. A commercial robot arm talks CAN: a
computer sends one message per motor command ("go to this angle") and reads
sensor values back in messages. The two cannot be wired together.

The bridge puts an FPGA and an embedded computer between them. The FPGA
terminates the AER buses; the computer, which owns a CAN controller chip,
builds and reads the CAN messages. The two are joined by a DMA link. This
repository holds the FPGA side: the logic that turns incoming spikes into
words for the computer, and words from the computer into outgoing spikes.

```
             +------------------------- aer_can_bridge_fpga -------------------------+
 AER in ---> | aer_rx --+--> timestamp_packer --> event_fifo (512x32) --+--> DMA out | ---> computer
 (Req/Ack)   |          |                                              |            |
             |          +--> spike_counter (6 nodes, 320 us windows) --+            |
             |                                                                       |
 AER out <-- | aer_tx <-- spike_gen (6 rate-coded nodes) <----------------- DMA in   | <--- computer
             +-----------------------------------------------------------------------+
 computer --GPIO--> CAN controller --> transceiver --> CAN bus --> 6 motor nodes   (not in this RTL)
```

## Two ways to hand spikes to the computer

The `mode` input (`aer_pkg::dma_mode_e`) picks what the computer receives.

* **`MODE_RAW`**: every event, stamped. Each accepted event becomes one
  32-bit DMA word `{timestamp[15:0], address[15:0]}`. The computer then
  keeps working with spikes itself. The timestamp counts microseconds
  (one tick every `CLK_MHZ` clocks) and wraps silently every 65.536 ms.
* **`MODE_FUSED`**: spike-to-digital conversion. Events are not forwarded.
  Instead they are counted per motor node over a fixed window of 320 us. At
  the end of each window, six words `{8'hC0, 5'b0, node[2:0], count[15:0]}`
  are sent in node order. The window length is the shortest interval
  between two CAN motor commands that the arm's CAN traffic allows. At one
  spike per microsecond, that gives up to 320 spikes of evidence for each
  update.

An event belongs to node `address[2:0]`. Addresses whose node field is 6 or 7
are counted nowhere.

The switch between modes is made to be safe at any time:

* Raw words still in the FIFO leave first after a switch to `MODE_FUSED`.
  Count words wait behind them.
* Count words are produced and discarded while in `MODE_RAW`. This keeps the
  window timing continuous.
* If a window ends before the previous window's six words have all gone,
  the new totals replace the unsent ones.

## Flow control and where events can be lost

The AER input never drops an event. `aer_rx` asserts Ack only once the
event word has been taken downstream. In `MODE_RAW` a full FIFO (512 words)
therefore stalls the AER sender through its handshake. Upstream AER chips
then buffer or drop according to their own rules. In `MODE_FUSED` the
counter takes an event every clock, so the input never stalls.

On the output side spikes *can* be lost. Each node keeps at most one spike
waiting to be sent. If the node's accumulator produces another spike before
the waiting one has left on the AER output bus, the new spike is lost and
`spike_dropped` pulses. This is a deliberate choice. A rate-coded stream
stays current when the output is slow, instead of building up a backlog of
old spikes.

## AER handshakes

Both AER ports use an active-low, 4-phase, bundled-data handshake. Req and
Ack are asynchronous to `clk`, and each side puts the incoming one through
a two-flop synchroniser.

* **`aer_rx`**: Req falls. After 3 clocks the address is on `ev_addr` with
  `ev_valid`. Ack falls one clock after the word is taken. Ack rises 3
  clocks after Req rises. The sender must hold the address stable while Req
  is low.
* **`aer_tx`**: the address is taken when the port is idle and driven on the
  bus at once. Req falls one clock later (setup). When the synchronised Ack
  is seen low, Req rises. The port then waits for Ack to rise before it takes
  the next address.

One handshake takes 7 clocks even when the sender answers at once: 2
synchroniser clocks, 1 offer clock and 1 Ack clock on the way down, and 2
synchroniser clocks and 1 Ack release clock on the way up. At 50 MHz the
AER input is therefore limited to about 7.1 Mevents/s. AER hardware can reach 25 Mevents/s. The DMA link would carry
that (25 M x 4 bytes = 100 MB/s against about 101.7 MB/s), but this
handshake would not. A faster clock or a 2-phase handshake would be needed.

## Spikes from numbers: `spike_gen`

The computer reads sensor values from the robot over CAN and sends them
back as rates. A DMA word `{8'hA0, 5'b0, node[2:0], rate[15:0]}` on
`dma_in_valid`/`dma_in_data` sets that node's rate. Words with another tag,
or with a node of 6 or more, are ignored.

Each node has a 24-bit phase accumulator. It adds `rate` every clock, and
each carry out is one spike. A node therefore fires
`rate * f_clk / 2^24` times a second: about 2.98 spikes/s per unit at
50 MHz, and up to about 195 k spikes/s. Spikes that are waiting leave in
round-robin node order as address `16'h0100 + node`.

## Interfaces of the top, `aer_can_bridge_fpga`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (50 MHz assumed), synchronous active-low reset |
| `mode` | in | `MODE_RAW` / `MODE_FUSED` |
| `aer_in_req_n`, `aer_in_addr[15:0]`, `aer_in_ack_n` | in, in, out | AER input bus |
| `aer_out_req_n`, `aer_out_addr[15:0]`, `aer_out_ack_n` | out, out, in | AER output bus |
| `dma_out_valid`, `dma_out_ready`, `dma_out_data[31:0]` | out, in, out | words to the computer, valid/ready |
| `dma_in_valid`, `dma_in_data[31:0]` | in, in | rate words from the computer (always accepted) |
| `ts_now`, `fifo_count`, `window_done`, `spike_dropped` | out | status |

Parameters: `AER_W` (16), `NODES` (6), `FIFO_DEPTH` (512), `WINDOW_US` (320)
and `CLK_MHZ` (50). The block parameters `TICK_CYCLES`, `CNT_W` (16),
`ACC_W` (24), `RATE_W` (16) and `ADDR_BASE` (`16'h0100`) keep their
defaults in the top.

## What comes from the published design, and what is this design's own

These come from the published bridge:

* the system split: FPGA for AER, embedded computer with a CAN controller,
  DMA between them;
* the two ways of passing sensor spikes (fused in the FPGA, or raw
  time-stamped events);
* 16-bit events with 16-bit timestamps;
* six motor nodes;
* the 320 us command interval;
* the reverse direction, from CAN sensor values to spike streams.

The published description gives these parts' function but not how they work
inside. The following are therefore this design's choices:

* the active-low 4-phase handshake and synchronisers;
* the 50 MHz clock and the 1 us timestamp tick;
* the FIFO and its depth (one Spartan-3 block RAM);
* counting as the fusion method, and the node = `address[2:0]` mapping;
* rate coding by phase accumulators, with the one-pending-spike rule;
* all word layouts and tags, and the valid/ready DMA ports with a `mode`
  pin standing in for the computer's DMA engine and registers.

The robot-side parts are not RTL:

* the embedded computer and its software, which builds CAN commands, sends
  them one after another or interlaced, and handles the arm's ACK messages;
* the CAN controller chip and the CAN transceiver;
* the motor nodes.

## Files

* `rtl/aer_pkg.sv`: widths, tags, the mode enum and word structs.
* `rtl/aer_rx.sv`, `rtl/aer_tx.sv`: the AER ports.
* `rtl/timestamp_packer.sv`, `rtl/event_fifo.sv`: the raw path.
* `rtl/spike_counter.sv`: the fused path.
* `rtl/spike_gen.sv`: the spike output generator.
* `rtl/aer_can_bridge_fpga.sv`: the top.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`. `tb_aer_can_bridge_fpga` runs the whole
  design at its default sizes through all of the following, and counts each
  one:
  * raw mode;
  * FIFO overflow with the AER sender held off;
  * a mode switch with raw words still queued;
  * three fused windows checked against a reference count;
  * rate-coded output;
  * dropped output spikes.
* `tb/tb_workload_rates.sv`: the whole design under the two rates that
  matter. In fused mode it sends one spike per microsecond and expects
  exactly 320 per window. In raw mode it measures the peak input rate
  (7 clocks per event).

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl rtl/aer_pkg.sv \
    tb/tb_aer_can_bridge_fpga.sv --top-module tb_aer_can_bridge_fpga -o tb
./obj_dir/tb
```

To run a block's own test, use its testbench and top module name instead
(for example `tb/tb_spike_gen.sv` with `--top-module tb_spike_gen`). The
end-to-end test simulates about 12 ms of design time and takes a few
seconds. The testbenches initialise everything they read, and the design
resets all state that it reads. The FIFO array is the exception, since it
is only read after being written.
