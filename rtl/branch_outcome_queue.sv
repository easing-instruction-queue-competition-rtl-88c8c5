// branch_outcome_queue: the branch outcome queue (BOQ) of one redundant pair.
//
// When a master-thread branch commits, its PC, direction and target are
// pushed. The slave thread's fetch stage reads the oldest entry as a perfect
// prediction for the same branch, so the slave never fetches down a wrong
// path. If the slave fetches a branch whose PC differs from the head entry,
// the two copies have diverged and pc_fault is raised for that cycle.
// Interface: m_push/m_ready (ready = not full), s_pop/s_ready (ready = not
// empty); the head is combinational. Depth 160 follows the evaluated
// configuration; the record layout and PC check are this design's choices.
module branch_outcome_queue
  import dddi_pkg::*;
#(
  parameter int unsigned DEPTH = 160
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            m_push,
  input  logic [XLEN-1:0] m_pc,
  input  logic            m_taken,
  input  logic [XLEN-1:0] m_target,
  output logic            m_ready,
  input  logic            s_pop,
  input  logic [XLEN-1:0] s_pc,
  output logic            s_taken,
  output logic [XLEN-1:0] s_target,
  output logic            s_ready,
  output logic            pc_fault,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  typedef struct packed {
    logic [XLEN-1:0] pc;
    logic            taken;
    logic [XLEN-1:0] target;
  } boq_entry_t;

  boq_entry_t head;
  logic empty, full;

  srt_fifo #(.WIDTH($bits(boq_entry_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(m_push), .wr_data({m_pc, m_taken, m_target}),
    .pop(s_pop), .rd_data(head),
    .empty, .full, .count
  );

  assign m_ready  = !full;
  assign s_ready  = !empty;
  assign s_taken  = head.taken;
  assign s_target = head.target;
  assign pc_fault = s_pop && !empty && (head.pc != s_pc);

endmodule
