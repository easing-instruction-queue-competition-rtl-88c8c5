// load_value_queue: the load value queue (LVQ) of one redundant thread pair.
//
// When a master-thread load commits, its address and loaded value are pushed.
// The slave copy of that load does not access the data cache: it takes the
// oldest entry, so both copies see the same value even if memory changed in
// between, and the slave never suffers a D-cache miss. The slave presents its
// own computed address; a difference from the master's address is an error
// in one copy and raises addr_fault for that cycle.
// Interface: m_push/m_ready (ready = not full, the master stalls otherwise);
// s_pop/s_ready (ready = not empty). s_data is combinational from the head.
// Depth 160 follows the evaluated configuration; the address check and the
// handshake are this design's choices.
module load_value_queue
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
  input  logic            s_pop,
  input  logic [XLEN-1:0] s_addr,
  output logic [XLEN-1:0] s_data,
  output logic            s_ready,
  output logic            addr_fault,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  logic [2*XLEN-1:0] head;
  logic empty, full;

  srt_fifo #(.WIDTH(2*XLEN), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(m_push), .wr_data({m_addr, m_data}),
    .pop(s_pop), .rd_data(head),
    .empty, .full, .count
  );

  assign m_ready    = !full;
  assign s_ready    = !empty;
  assign s_data     = head[XLEN-1:0];
  assign addr_fault = s_pop && !empty && (head[2*XLEN-1:XLEN] != s_addr);

endmodule
