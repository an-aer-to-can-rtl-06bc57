// tb_timestamp_packer: self-checking test of the event time-stamper.
//
// A reference model counts clocks since reset and predicts the stamp of an
// event accepted in clock k as floor(k / TICK) mod 2^16. The test checks
// each output word against {stamp, address}, the one-event-per-clock rate
// with a ready downstream, that backpressure loses nothing, and that the
// stamp wraps (TICK is shortened to 3 clocks to reach the wrap quickly).
module tb_timestamp_packer;
  localparam int TICK = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [15:0] in_addr = '0, ts_now;
  logic [31:0] out_data;
  int checks = 0, failures = 0;
  longint k = 0;
  logic [31:0] exp_q [$];
  int accepted = 0, emitted = 0;
  bit wrapped = 0;

  always #5 clk = ~clk;

  timestamp_packer #(.TICK_CYCLES(TICK)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_addr,
                                              .out_valid, .out_ready, .out_data, .ts_now);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      logic [15:0] ts;
      ts = 16'(k / TICK);
      if (in_valid && in_ready) begin
        exp_q.push_back({ts, in_addr});
        accepted++;
      end
      if (out_valid && out_ready) begin
        logic [31:0] e;
        e = exp_q.pop_front();
        if (e[31:16] == 16'hFFFF) wrapped = 1;
        // check every word near the wrap and a sample of the others
        if (emitted % 7 == 0 || e[31:16] == 16'hFFFF || e[31:16] == 16'h0000)
          check(out_data == e, $sformatf("word %0d: got %h expected %h", emitted, out_data, e));
        emitted++;
      end
      k++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Full rate: 100 events in 100 clocks with ready always high.
    a0 = accepted;
    for (int i = 0; i < 100; i++) begin
      in_valid = 1; in_addr = 16'(i);
      @(negedge clk);
    end
    in_valid = 0;
    check(accepted - a0 == 100, $sformatf("%0d events taken in 100 clocks", accepted - a0));
    // Random valid and ready until past the wrap of the stamp.
    while (k < 65536 * TICK + 2000) begin
      in_valid  = ($urandom_range(0, 3) == 0);
      in_addr   = 16'($urandom);
      out_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    check(emitted == accepted, $sformatf("%0d accepted, %0d emitted", accepted, emitted));
    check(wrapped, "stamp never reached 16'hFFFF");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
