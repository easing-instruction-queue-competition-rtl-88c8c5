// store_buffer_compare: the store buffer (STB) with output comparison of one
// redundant thread pair.
//
// Stores are the only values that leave the sphere of replication, so they
// are the point of fault detection. A committed master store (address and
// data) waits here. When the slave copy of the same store commits, it is
// compared with the oldest waiting master store: if address and data agree
// the store is released to the data cache (mem_wr_*) and leaves the buffer;
// if they differ, fault is raised, the store is withheld and the fault is
// held until reset.
// Interface: m_push/m_ready (ready = not full); s_valid/s_ready (ready = a
// master store is waiting, the cache accepts a write and no fault is held).
// The release happens in the same cycle as the slave store. Depth 160
// follows the evaluated configuration; holding the buffer on a fault is this
// design's choice (fault recovery is outside this design).
module store_buffer_compare
  import dddi_pkg::*;
#(
  parameter int unsigned DEPTH = 160
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            m_push,
  input  logic [XLEN-1:0] m_addr,
  input  logic [XLEN-1:0] m_data,
  output logic            m_ready,
  input  logic            s_valid,
  input  logic [XLEN-1:0] s_addr,
  input  logic [XLEN-1:0] s_data,
  output logic            s_ready,
  output logic            mem_wr_valid,
  output logic [XLEN-1:0] mem_wr_addr,
  output logic [XLEN-1:0] mem_wr_data,
  input  logic            mem_wr_ready,
  output logic            fault,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  logic [2*XLEN-1:0] head;
  logic empty, full, match, take;

  assign s_ready = !empty && mem_wr_ready && !fault;
  assign take    = s_valid && s_ready;
  assign match   = (head == {s_addr, s_data});

  srt_fifo #(.WIDTH(2*XLEN), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(m_push), .wr_data({m_addr, m_data}),
    .pop(take && match), .rd_data(head),
    .empty, .full, .count
  );

  assign m_ready      = !full;
  assign mem_wr_valid = take && match;
  assign mem_wr_addr  = head[2*XLEN-1:XLEN];
  assign mem_wr_data  = head[XLEN-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              fault <= 1'b0;
    else if (take && !match) fault <= 1'b1;
  end

endmodule
