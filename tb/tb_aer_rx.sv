// tb_aer_rx: self-checking test of the AER input port.
//
// A 4-phase active-low sender model sends random addresses with random gaps
// while the clocked side takes them with a random ready. Checks: every
// address arrives once and in order; Ack never falls before the word was
// taken; the latency from Req falling to ev_valid is 3 clocks; with the
// clocked side stalled, Ack stays high (the sender is held off).
module tb_aer_rx;
  localparam int W = 16;
  localparam int N = 200;

  logic clk = 0, rst_n = 0;
  logic req_n = 1, ack_n, ev_valid, ev_ready;
  logic [W-1:0] aer_addr = '0, ev_addr;
  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];
  int rcvd = 0;
  bit taken_since_req;

  always #5 clk = ~clk;

  aer_rx #(.AER_W(W)) dut (.clk, .rst_n, .aer_req_n(req_n), .aer_addr, .aer_ack_n(ack_n),
                           .ev_valid, .ev_ready, .ev_addr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sender: one 4-phase handshake per address.
  task automatic send(input logic [W-1:0] a);
    aer_addr = a;
    #1 req_n = 0;
    wait (ack_n == 0);
    #3 req_n = 1;
    wait (ack_n == 1);
  endtask

  // Receiver side: check words against the sender's list.
  always @(posedge clk) begin
    if (rst_n && ev_valid && ev_ready) begin
      logic [W-1:0] exp;
      exp = sent.pop_front();
      check(ev_addr == exp, $sformatf("word %0d: got %h expected %h", rcvd, ev_addr, exp));
      rcvd++;
      taken_since_req = 1;
    end
  end

  // Ack must not fall before the word has been taken.
  always @(negedge ack_n) begin
    check(taken_since_req, "Ack fell before the word was taken");
    taken_since_req = 0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    taken_since_req = 0;
    ev_ready = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Latency: Req falls just after a negedge, ev_valid after 3 posedges.
    @(negedge clk);
    sent.push_back(16'hBEEF);
    aer_addr = 16'hBEEF; req_n = 0;
    lat = 0;
    while (!ev_valid) begin @(posedge clk); #1 lat++; end
    check(lat == 3, $sformatf("Req-to-valid latency %0d, expected 3", lat));
    wait (ack_n == 0); #3 req_n = 1; wait (ack_n == 1);
    // Stall: ready low, Ack must stay high while the word is offered.
    @(negedge clk) ev_ready = 0;
    sent.push_back(16'h1234);
    fork send(16'h1234); join_none
    repeat (20) @(posedge clk);
    check(ack_n == 1 && ev_valid, "sender not held off while ready is low");
    @(negedge clk) ev_ready = 1;
    wait (ack_n == 1 && req_n == 1 && !ev_valid);
    repeat (2) @(posedge clk);
    // Random traffic.
    fork
      begin
        for (int i = 0; i < N; i++) begin
          logic [W-1:0] a;
          a = W'($urandom);
          sent.push_back(a);
          send(a);
          repeat ($urandom_range(0, 3)) @(posedge clk);
        end
      end
      begin
        forever begin @(negedge clk); ev_ready = ($urandom_range(0, 2) != 0); end
      end
    join_any
    disable fork;
    ev_ready = 1;
    repeat (10) @(posedge clk);
    check(rcvd == N + 2, $sformatf("received %0d words, expected %0d", rcvd, N + 2));
    check(sent.size() == 0, "words left unreceived");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
