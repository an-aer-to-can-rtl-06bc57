// tb_spike_counter: self-checking test of the per-node spike counter.
//
// Random events, with node fields 0..7 (6 and 7 must be ignored), are fed
// for five windows. A reference counts them per node and window, the event
// in the window's last clock going to the next window. Checks: windows are
// exactly 320 us = 16000 clocks at 50 MHz; each window yields six words
// {8'hC0, node, count} in node order with the reference counts, also under
// a random ready. A second, small instance (4-bit counts, 20-clock window)
// checks that counts saturate at 15.
module tb_spike_counter;
  localparam int WIN = 320 * 50;

  logic clk = 0, rst_n = 0;
  logic ev_valid = 0, ev_ready, out_valid, out_ready = 1, window_done;
  logic [15:0] ev_addr = '0;
  logic [31:0] out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spike_counter dut (.clk, .rst_n, .ev_valid, .ev_ready, .ev_addr, .out_valid, .out_ready,
                     .out_data, .window_done);

  // Small instance for saturation: node 0 fires every clock.
  logic s_valid, s_done, s_ready_unused;
  logic [31:0] s_data;
  spike_counter #(.WINDOW_US(2), .CLK_MHZ(10), .CNT_W(4)) dut_sat (
    .clk, .rst_n, .ev_valid(1'b1), .ev_ready(s_ready_unused), .ev_addr(16'h0),
    .out_valid(s_valid), .out_ready(1'b1), .out_data(s_data), .window_done(s_done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cur [8];
  int exp_q [$];      // expected words, node order, as node*65536 + count
  longint cyc = 0, last_done = -1;
  int windows = 0, words = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (window_done) begin
        if (last_done >= 0) check(cyc - last_done == WIN, $sformatf("window of %0d clocks", cyc - last_done));
        else check(cyc == WIN - 1, $sformatf("first window ends at clock %0d", cyc));
        last_done = cyc;
        exp_q.delete();
        for (int n = 0; n < 6; n++) exp_q.push_back(n * 65536 + cur[n]);
        for (int n = 0; n < 8; n++) cur[n] = 0;
        windows++;
      end
      if (ev_valid) cur[ev_addr[2:0]]++;
      if (out_valid && out_ready) begin
        int e;
        e = exp_q.pop_front();
        check(out_data == {8'hC0, 5'b0, 3'(e / 65536), 16'(e % 65536)},
              $sformatf("window %0d: word %h, expected node %0d count %0d", windows, out_data, e / 65536, e % 65536));
        words++;
      end
      if (s_valid && s_data[18:16] == 3'd0) check(s_data[15:0] == 16'd15, $sformatf("saturated count %0d", s_data[15:0]));
      cyc++;
    end
  end

  initial begin
    repeat (6 * WIN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (windows < 5) begin
      ev_valid  = ($urandom_range(0, 9) < windows + 1);
      ev_addr   = 16'($urandom);
      out_ready = ($urandom_range(0, 1) == 0);
      check(ev_ready, "ev_ready low");
      @(negedge clk);
    end
    out_ready = 1;
    repeat (10) @(negedge clk);
    check(words == 6 * 5, $sformatf("%0d count words, expected 30", words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
