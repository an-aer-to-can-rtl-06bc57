// tb_event_fifo: self-checking test of the 512-word event FIFO.
//
// A queue is the reference. The test fills the FIFO until it refuses a word
// and checks that this happens at exactly 512 words and that count agrees,
// drains it in order, checks that a word written into the empty FIFO is
// visible two clocks later, and then runs random traffic on both sides.
module tb_event_fifo;
  localparam int DEPTH = 512;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [31:0] wr_data = '0, rd_data;
  logic [9:0] count;
  int checks = 0, failures = 0;
  logic [31:0] ref_q [$];
  int nrd = 0;

  always #5 clk = ~clk;

  event_fifo dut (.clk, .rst_n, .wr_valid, .wr_ready, .wr_data, .rd_valid, .rd_ready, .rd_data, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_valid && rd_ready) begin
        logic [31:0] e;
        e = ref_q.pop_front();
        check(rd_data == e, $sformatf("read %0d: got %h expected %h", nrd, rd_data, e));
        nrd++;
      end
      if (wr_valid && wr_ready) ref_q.push_back(wr_data);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, lat;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Fill until refused.
    n = 0;
    wr_valid = 1;
    while (wr_ready && n < DEPTH + 10) begin
      wr_data = $urandom; @(negedge clk); n++;
    end
    wr_valid = 0;
    check(n == DEPTH, $sformatf("FIFO took %0d words, expected %0d", n, DEPTH));
    check(count == 10'(DEPTH), $sformatf("count %0d when full", count));
    // Drain.
    rd_ready = 1;
    while (rd_valid) @(negedge clk);
    rd_ready = 0;
    check(ref_q.size() == 0 && count == 0, "not empty after draining");
    // Latency through the empty FIFO.
    wr_valid = 1; wr_data = 32'hCAFE_F00D;
    @(negedge clk) wr_valid = 0;
    lat = 1;
    while (!rd_valid) begin @(negedge clk); lat++; end
    check(lat == 2, $sformatf("write-to-visible %0d clocks, expected 2", lat));
    // Random traffic.
    for (int i = 0; i < 8000; i++) begin
      wr_valid = ($urandom_range(0, 1) == 0) && (i < 7500);
      wr_data  = $urandom;
      rd_ready = ($urandom_range(0, 2) == 0) || (i > 7000);
      @(negedge clk);
      check(count == 10'(ref_q.size()), $sformatf("count %0d, reference %0d", count, ref_q.size()));
    end
    check(ref_q.size() == 0, "words left after final drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
