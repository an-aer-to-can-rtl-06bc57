// tb_aer_can_bridge_fpga: end-to-end test of the bridge's FPGA logic at its
// default sizes (16-bit events, 512-word FIFO, six nodes, 320 us windows,
// 50 MHz).
//
// Models around the design: a 4-phase AER sender on the input bus, a 4-phase
// AER receiver on the output bus (which can be told to stop answering), and
// the computer's side of the DMA link, reading words with a chosen ready and
// writing rate words.
//
// Phases and what is checked:
//  1 raw mode: random events arrive as {stamp, address} in order, each
//    stamp between the microsecond its Req fell and the one it was read;
//  2 overflow: with the DMA stalled the FIFO fills to 512 words, Ack is
//    then held back, and after the stall every event still arrives;
//  3 mode switch: raw words left in the FIFO leave before count words, and
//    windows that ended in raw mode sent no count word (checked on every
//    DMA word);
//  4 fused mode: bursts sent in the middle of a window come back as six
//    count words per window with the reference counts, 320 us apart;
//  5 spike output: rate words make spikes at rate * 50e6 / 2^24 per second
//    on the node's address; a stalled output bus makes spikes drop.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_aer_can_bridge_fpga;
  import aer_pkg::*;

  logic clk = 0, rst_n = 0;
  dma_mode_e mode = MODE_RAW;
  logic in_req_n = 1, in_ack_n;
  logic [15:0] in_addr = '0;
  logic out_req_n, out_ack_n = 1;
  logic [15:0] out_addr;
  logic dma_out_valid, dma_out_ready = 1;
  logic [31:0] dma_out_data;
  logic dma_in_valid = 0;
  logic [31:0] dma_in_data = '0;
  logic [15:0] ts_now;
  logic [9:0] fifo_count;
  logic window_done, spike_dropped;

  always #10 clk = ~clk;  // 50 MHz

  aer_can_bridge_fpga dut (
    .clk, .rst_n, .mode,
    .aer_in_req_n(in_req_n), .aer_in_addr(in_addr), .aer_in_ack_n(in_ack_n),
    .aer_out_req_n(out_req_n), .aer_out_addr(out_addr), .aer_out_ack_n(out_ack_n),
    .dma_out_valid, .dma_out_ready, .dma_out_data,
    .dma_in_valid, .dma_in_data,
    .ts_now, .fifo_count, .window_done, .spike_dropped);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- clock count ----
  longint cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;

  // ---- mechanism counters ----
  int n_raw = 0, n_full = 0, n_ack_stall = 0, n_switch = 0, n_drain = 0;
  int n_windows = 0, n_count_words = 0, n_spikes = 0, n_drop = 0, n_discard = 0;

  // ---- AER input sender ----
  typedef struct { logic [15:0] addr; longint t_req; } sent_t;
  sent_t raw_q [$];
  bit    sender_waiting = 0;

  task automatic send(input logic [15:0] a);
    @(negedge clk);
    in_addr = a;
    if (mode == MODE_RAW) raw_q.push_back('{a, cyc});
    #2 in_req_n = 0;
    sender_waiting = 1;
    wait (in_ack_n == 0);
    sender_waiting = 0;
    #3 in_req_n = 1;
    wait (in_ack_n == 1);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (fifo_count == 10'd512) n_full++;
      if (sender_waiting && fifo_count == 10'd512) n_ack_stall++;
      if (window_done) n_windows++;
      if (spike_dropped) n_drop++;
      if (mode == MODE_RAW && window_done) n_discard++;  // its count words are dropped
    end
  end

  // ---- DMA reader ----
  int cnt_q [$];  // expected count words, node*65536 + count
  always @(posedge clk) begin
    if (rst_n && dma_out_valid && dma_out_ready) begin
      if (dma_out_data[31:24] == TAG_COUNT && raw_q.size() == 0) begin
        int e;
        n_count_words++;
        check(mode == MODE_FUSED, "count word in raw mode");
        if (cnt_q.size() > 0) begin
          e = cnt_q.pop_front();
          check(dma_out_data == {TAG_COUNT, 5'b0, 3'(e / 65536), 16'(e % 65536)},
                $sformatf("count word %h, expected node %0d count %0d", dma_out_data, e / 65536, e % 65536));
        end
      end else begin
        sent_t s;
        logic [15:0] ts_lo, ts_hi;
        n_raw++;
        if (mode == MODE_FUSED) n_drain++;
        if (raw_q.size() == 0) check(0, $sformatf("unexpected DMA word %h", dma_out_data));
        else begin
          s = raw_q.pop_front();
          ts_lo = 16'(s.t_req / 50);
          ts_hi = 16'(cyc / 50);
          check(dma_out_data[15:0] == s.addr, $sformatf("raw word %h, expected address %h", dma_out_data, s.addr));
          check(16'(dma_out_data[31:16] - ts_lo) <= 16'(ts_hi - ts_lo),
                $sformatf("stamp %0d outside [%0d,%0d]", dma_out_data[31:16], ts_lo, ts_hi));
        end
      end
    end
  end

  // ---- AER output receiver ----
  int  spk [8];
  bit  out_answer = 1;
  initial begin
    wait (rst_n);
    forever begin
      wait (out_req_n == 0 && out_answer);
      check(out_addr >= 16'h0100 && out_addr < 16'h0106, $sformatf("output address %h", out_addr));
      spk[out_addr[2:0]]++;
      n_spikes++;
      #4 out_ack_n = 0;
      wait (out_req_n == 1);
      #4 out_ack_n = 1;
    end
  end

  task automatic rate(input int node, input int r);
    @(negedge clk);
    dma_in_valid = 1; dma_in_data = {TAG_RATE, 5'b0, 3'(node), 16'(r)};
    @(negedge clk);
    dma_in_valid = 0;
  endtask

  // ---- watchdog ----
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_cnt [6];
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1: raw mode with a random DMA ready.
    fork
      for (int i = 0; i < 300; i++) send(16'($urandom));
      forever begin @(negedge clk); dma_out_ready = ($urandom_range(0, 3) != 0); end
    join_any
    disable fork;
    dma_out_ready = 1;
    wait (raw_q.size() == 0);
    check(n_raw == 300, $sformatf("%0d raw words, expected 300", n_raw));

    // 2: overflow. DMA stalled, 530 events: the FIFO (512) plus the packer
    // register hold 513, the rest wait on Ack.
    @(negedge clk) dma_out_ready = 0;
    fork
      for (int i = 0; i < 530; i++) send(16'(i));
    join_none
    repeat (20000) @(posedge clk);  // long enough for a window to end in raw mode
    check(fifo_count == 10'd512, $sformatf("FIFO holds %0d words, expected 512", fifo_count));
    check(in_ack_n == 1 && in_req_n == 0, "AER sender not held off with the FIFO full");
    @(negedge clk) dma_out_ready = 1;
    wait fork;
    wait (raw_q.size() == 0);
    check(n_raw == 830, $sformatf("%0d raw words after overflow, expected 830", n_raw));

    // 3: mode switch with raw words still queued.
    @(negedge clk) dma_out_ready = 0;
    for (int i = 0; i < 20; i++) send(16'h4000 + 16'(i));
    repeat (5) @(negedge clk);
    mode = MODE_FUSED; n_switch++;
    repeat (20) @(negedge clk);
    dma_out_ready = 1;
    wait (raw_q.size() == 0);

    // 4: fused mode, three windows with known bursts.
    @(posedge window_done);
    repeat (3) @(posedge window_done);  // flush any words of the partial window
    repeat (10) @(posedge clk);
    cnt_q.delete();
    for (int w = 0; w < 3; w++) begin
      for (int n = 0; n < 6; n++) ref_cnt[n] = 0;
      repeat (500) @(posedge clk);
      for (int i = 0; i < 400 + 100 * w; i++) begin
        logic [15:0] a;
        a = 16'($urandom);
        if (a[2:0] < 3'd6) ref_cnt[a[2:0]]++;
        send(a);
      end
      @(posedge window_done);
      for (int n = 0; n < 6; n++) cnt_q.push_back(n * 65536 + ref_cnt[n]);
      repeat (20) @(posedge clk);
      check(cnt_q.size() == 0, $sformatf("window %0d: %0d count words missing", w, cnt_q.size()));
    end

    // 5: spike output.
    for (int n = 0; n < 8; n++) spk[n] = 0;
    rate(2, 20000);
    rate(4, 5000);
    repeat (100000) @(negedge clk);
    rate(2, 0);
    rate(4, 0);
    repeat (50) @(negedge clk);
    begin
      int e2, e4;
      e2 = int'((64'd20000 * 64'd100002) >> 24);
      e4 = int'((64'd5000 * 64'd100002) >> 24);
      check(spk[2] >= e2 - 1 && spk[2] <= e2 + 1, $sformatf("node 2: %0d spikes, expected %0d", spk[2], e2));
      check(spk[4] >= e4 - 1 && spk[4] <= e4 + 1, $sformatf("node 4: %0d spikes, expected %0d", spk[4], e4));
      check(spk[0] + spk[1] + spk[3] + spk[5] == 0, "spikes on nodes without a rate");
    end
    out_answer = 0;
    rate(1, 60000);
    repeat (2000) @(negedge clk);
    rate(1, 0);
    out_answer = 1;
    repeat (50) @(negedge clk);

    $display("mechanisms: raw=%0d fifo_full=%0d ack_stall=%0d mode_switch=%0d drain_after_switch=%0d windows=%0d raw_mode_windows_discarded=%0d count_words=%0d spikes=%0d drops=%0d",
             n_raw, n_full, n_ack_stall, n_switch, n_drain, n_windows, n_discard, n_count_words, n_spikes, n_drop);
    check(n_raw > 0, "raw words never seen");
    check(n_full > 0, "FIFO never full");
    check(n_ack_stall > 0, "AER sender never held off");
    check(n_switch > 0, "mode never switched");
    check(n_drain > 0, "no raw word drained after the switch");
    check(n_windows > 0 && n_count_words >= 18, "fused windows not seen");
    check(n_spikes > 0, "no output spikes");
    check(n_discard > 0, "no window ended in raw mode");
    check(n_drop > 0, "no dropped output spike");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
