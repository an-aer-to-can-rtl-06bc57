// tb_workload_rates: the bridge under the two event rates that matter for
// the arm, at default sizes.
//
//  A. Fused mode at one spike per microsecond, the case the 320 us command
//     interval is sized for: a sender fires every 50 clocks for five full
//     windows, cycling over the six nodes. Every complete window must report
//     exactly 320 events in total, 53 or 54 for each node.
//  B. Raw mode at the highest rate the AER input allows: a sender that
//     answers each Ack edge within 2 ns sends 2000 events with the DMA side
//     always ready. The test reports the achieved rate against the 25
//     Mevents/s that AER hardware can reach, and checks the handshake cost
//     of 7 clocks per event: 2 synchroniser clocks + 1 offer clock + 1 Ack
//     clock on the way down, 2 synchroniser clocks + 1 Ack release clock on
//     the way up.
module tb_workload_rates;
  import aer_pkg::*;

  logic clk = 0, rst_n = 0;
  dma_mode_e mode = MODE_FUSED;
  logic in_req_n = 1, in_ack_n;
  logic [15:0] in_addr = '0;
  logic out_req_n, out_ack_n = 1;
  logic [15:0] out_addr;
  logic dma_out_valid, dma_out_ready = 1;
  logic [31:0] dma_out_data;
  logic [15:0] ts_now;
  logic [9:0] fifo_count;
  logic window_done, spike_dropped;

  always #10 clk = ~clk;  // 50 MHz

  aer_can_bridge_fpga dut (
    .clk, .rst_n, .mode,
    .aer_in_req_n(in_req_n), .aer_in_addr(in_addr), .aer_in_ack_n(in_ack_n),
    .aer_out_req_n(out_req_n), .aer_out_addr(out_addr), .aer_out_ack_n(out_ack_n),
    .dma_out_valid, .dma_out_ready, .dma_out_data,
    .dma_in_valid(1'b0), .dma_in_data(32'h0),
    .ts_now, .fifo_count, .window_done, .spike_dropped);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Count words of the fused phase, per window.
  int win_total = 0, win_words = 0, win_seen = 0, node_cnt [6];
  int raw_words = 0;
  longint cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;
  always @(posedge clk) begin
    if (rst_n && dma_out_valid && dma_out_ready) begin
      if (mode == MODE_FUSED) begin
        node_cnt[dma_out_data[18:16]] = int'(dma_out_data[15:0]);
        win_total += int'(dma_out_data[15:0]);
        win_words++;
        if (win_words == 6) begin
          win_seen++;
          // Windows 2..5 are full windows of steady 1 us traffic.
          if (win_seen >= 2 && win_seen <= 5) begin
            check(win_total == 320, $sformatf("window %0d: %0d events, expected 320", win_seen, win_total));
            for (int n = 0; n < 6; n++)
              check(node_cnt[n] >= 53 && node_cnt[n] <= 54,
                    $sformatf("window %0d node %0d: %0d events, expected 53 or 54", win_seen, n, node_cnt[n]));
          end
          win_total = 0; win_words = 0;
        end
      end else begin
        raw_words++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // A: one event every 50 clocks for 6 windows, aligned to the windows.
    @(posedge window_done);
    win_total = 0; win_words = 0; win_seen = 0;
    // Req falls every 50 clocks; the 7-clock handshake fits well inside.
    t0 = cyc;
    for (int i = 0; i < 6 * 320; i++) begin
      while (cyc < t0 + 50 * i) @(negedge clk);
      in_addr = 16'(i % 6);
      #2 in_req_n = 0;
      wait (in_ack_n == 0);
      #2 in_req_n = 1;
      wait (in_ack_n == 1);
    end
    repeat (20000) @(posedge clk);
    check(win_seen >= 5, $sformatf("only %0d windows reported", win_seen));

    // B: peak raw rate.
    @(negedge clk) mode = MODE_RAW;
    repeat (10) @(negedge clk);
    t0 = $time;
    for (int i = 0; i < 2000; i++) begin
      in_addr = 16'(i);
      #1 in_req_n = 0;
      wait (in_ack_n == 0);
      #2 in_req_n = 1;
      wait (in_ack_n == 1);
      #1;
    end
    t1 = $time;
    repeat (20) @(posedge clk);
    begin
      real cyc_per_ev, mevps;
      cyc_per_ev = real'(t1 - t0) / 20.0 / 2000.0;
      mevps = 50.0 / cyc_per_ev;
      $display("peak raw input: %0.2f clocks per event = %0.2f Mevents/s at 50 MHz (AER peak 25 Mevents/s)",
               cyc_per_ev, mevps);
      check(cyc_per_ev > 6.9 && cyc_per_ev < 7.1, $sformatf("%0.2f clocks per event, expected 7", cyc_per_ev));
      check(mevps < 25.0, "raw input faster than the handshake bound allows");
    end
    check(raw_words == 2000, $sformatf("%0d raw words, expected 2000", raw_words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
