// event_fifo: synchronous FIFO between the AER input and the DMA link.
//
// Events arrive one by one from the AER bus while the embedded computer
// fetches them in DMA bursts; this buffer absorbs the difference. Its depth,
// 512 words of 32 bits, fills one block RAM of the Spartan-3 FPGA the
// bridge is built on; buffer and depth are this design's choice.
//
// Storage is a plain array written and read on the clock edge, followed by
// an output register that makes the head word visible (first-word fall
// through). A word written into an empty FIFO appears on rd_data two clocks
// later. Both sides use valid/ready: a word moves when valid && ready.
// wr_ready is low when the FIFO holds DEPTH words; count includes the word in
// the output register.
module event_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 512
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_valid,
  output logic                   wr_ready,
  input  logic [WIDTH-1:0]       wr_data,
  output logic                   rd_valid,
  input  logic                   rd_ready,
  output logic [WIDTH-1:0]       rd_data,
  output logic [$clog2(DEPTH):0] count
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      mem_count;   // words in the array
  logic             do_wr, do_rd, load_out;

  assign wr_ready = (count < ($clog2(DEPTH)+1)'(DEPTH));
  assign do_wr    = wr_valid && wr_ready;
  // Move a word from the array to the output register when it is empty or
  // being emptied.
  assign load_out = (mem_count != 0) && (!rd_valid || rd_ready);
  assign do_rd    = load_out;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      mem_count <= '0;
      rd_valid  <= 1'b0;
      rd_data   <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      mem_count <= mem_count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (load_out) begin
        rd_data  <= mem[rd_ptr];
        rd_valid <= 1'b1;
      end else if (rd_ready) begin
        rd_valid <= 1'b0;
      end
    end
  end

  assign count = mem_count + (AW+1)'(rd_valid);

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    mem_count <= (AW+1)'(DEPTH));

endmodule
