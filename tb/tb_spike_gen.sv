// tb_spike_gen: self-checking test of the rate-coded spike generator.
//
// The accumulator is shortened to 12 bits so that rates show up quickly: a
// node with rate r must fire floor(r * clocks / 4096) times. Checks: the
// per-node spike counts over 40960 clocks (within 1, for a spike still in
// flight); writes with a wrong tag or a node of 6 or more change nothing;
// output addresses are 16'h0100 + node; a node whose spike cannot leave
// reports dropped spikes; six spikes pending at once leave one per node in
// round-robin order.
module tb_spike_gen;
  localparam int ACC = 12;
  localparam int T   = 40960;

  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0, ev_valid, ev_ready = 1, dropped;
  logic [31:0] cfg_data = '0;
  logic [15:0] ev_addr;
  int checks = 0, failures = 0;
  int cnt [8];
  int seq [$];
  int ndrop = 0;
  bit record = 0;

  always #5 clk = ~clk;

  spike_gen #(.ACC_W(ACC)) dut (.clk, .rst_n, .cfg_valid, .cfg_data, .ev_valid, .ev_ready,
                                .ev_addr, .dropped);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input logic [7:0] tag, input int node, input int rate);
    cfg_valid = 1; cfg_data = {tag, 5'b0, 3'(node), 16'(rate)};
    @(negedge clk);
    cfg_valid = 0;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_valid && ev_ready) begin
        check(ev_addr >= 16'h0100 && ev_addr < 16'h0106, $sformatf("address %h", ev_addr));
        cnt[ev_addr[2:0]]++;
        if (record) seq.push_back(int'(ev_addr[2:0]));
      end
      if (dropped) ndrop++;
    end
  end

  initial begin
    repeat (T + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Ignored writes first, then the six rates in one go (one per clock).
    write(8'hA1, 0, 4000);
    write(8'hA0, 7, 4000);
    repeat (100) @(negedge clk);
    check(cnt[0] == 0 && !ev_valid, "ignored write produced spikes");
    for (int n = 0; n < 8; n++) cnt[n] = 0;
    // Rates are written on consecutive clocks; node n starts T+5-n clocks
    // before the writes of the end block.
    for (int n = 0; n < 6; n++) write(8'hA0, n, 60 * (n + 1));
    repeat (T) @(negedge clk);
    for (int n = 0; n < 6; n++) write(8'hA0, n, 0);
    repeat (10) @(negedge clk);
    for (int n = 0; n < 6; n++) begin
      int e;
      e = (60 * (n + 1) * (T + 6)) / 4096;
      check(cnt[n] >= e - 1 && cnt[n] <= e + 1, $sformatf("node %0d: %0d spikes, expected %0d", n, cnt[n], e));
    end
    check(cnt[6] == 0 && cnt[7] == 0, "spikes on nodes 6 or 7");
    // Dropped spikes: output stalled, fast node.
    ev_ready = 0;
    write(8'hA0, 5, 4095);
    repeat (50) @(negedge clk);
    check(ndrop > 40, $sformatf("%0d drops reported, expected over 40", ndrop));
    write(8'hA0, 5, 0);
    // All six pending at once, then released: one spike per node, in turn.
    for (int n = 0; n < 6; n++) write(8'hA0, n, 2048);
    repeat (4) @(negedge clk);
    for (int n = 0; n < 6; n++) write(8'hA0, n, 0);
    record = 1;
    ev_ready = 1;
    repeat (20) @(negedge clk);
    check(seq.size() == 6, $sformatf("%0d spikes after release, expected 6", seq.size()));
    if (seq.size() == 6)
      for (int i = 1; i < 6; i++)
        check(seq[i] == (seq[i-1] + 1) % 6, $sformatf("round-robin order broken at %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
