// tb_aer_tx: self-checking test of the AER output port.
//
// A 4-phase active-low receiver model answers Req with Ack after a random
// delay and records the address it saw. Checks: every offered address goes
// out once and in order; the address is stable while Req is low; Req falls
// exactly 2 clocks after the address was taken (1 clock of setup); the next
// address is not taken before Ack has been released.
module tb_aer_tx;
  localparam int W = 16;
  localparam int N = 200;

  logic clk = 0, rst_n = 0;
  logic ev_valid = 0, ev_ready, req_n, ack_n = 1;
  logic [W-1:0] ev_addr = '0, aer_addr;
  int checks = 0, failures = 0;
  logic [W-1:0] exp_q [$];
  int got = 0;

  always #5 clk = ~clk;

  aer_tx #(.AER_W(W)) dut (.clk, .rst_n, .ev_valid, .ev_ready, .ev_addr,
                           .aer_req_n(req_n), .aer_addr, .aer_ack_n(ack_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Receiver model.
  initial begin
    wait (rst_n);
    forever begin
      logic [W-1:0] a;
      wait (req_n == 0);
      a = aer_addr;
      repeat ($urandom_range(0, 4)) @(posedge clk);
      check(aer_addr == a, "address changed while Req was low");
      if (exp_q.size() == 0) check(0, "unexpected request");
      else check(a == exp_q.pop_front(), $sformatf("event %0d: wrong address %h", got, a));
      got++;
      #2 ack_n = 0;
      wait (req_n == 1);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #2 ack_n = 1;
    end
  end

  // No address may be taken while a handshake is open.
  always @(posedge clk)
    if (rst_n && ev_valid && ev_ready) check(req_n && ack_n, "address taken during a handshake");

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Latency from hand-over to Req.
    @(negedge clk) begin ev_valid = 1; ev_addr = 16'hA5A5; exp_q.push_back(16'hA5A5); end
    @(posedge clk); #1 check(!ev_ready, "ev_ready high after hand-over");
    ev_valid = 0;
    lat = 1;
    while (req_n) begin @(posedge clk); #1 lat++; end
    check(lat == 2, $sformatf("hand-over to Req %0d clocks, expected 2", lat));
    // Random stream.
    for (int i = 0; i < N; i++) begin
      logic [W-1:0] a;
      a = W'($urandom);
      @(negedge clk);
      ev_valid = 1; ev_addr = a;
      exp_q.push_back(a);
      while (!ev_ready) @(negedge clk);
      @(negedge clk) ev_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    wait (exp_q.size() == 0);
    wait (req_n && ack_n);
    repeat (5) @(posedge clk);
    check(got == N + 1, $sformatf("%0d events sent, expected %0d", got, N + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
