// srt_fifo: synchronous first-in first-out buffer used by the SRT queues
// (load value queue, branch outcome queue, store buffer).
//
// DEPTH need not be a power of two (the queues hold 160 entries); the read
// and write pointers wrap at DEPTH. push is accepted when the FIFO is not
// full, pop when it is not empty; a push and a pop may happen in the same
// cycle. The head entry (rd_data) is visible combinationally while not empty.
// Both take effect at the next rising edge.
module srt_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 160
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;

  logic do_push, do_pop;
  assign empty   = (count == '0);
  assign full    = (32'(count) == DEPTH);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + PTR_W'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);
    end
  end

endmodule
