// dddi_pkg: shared sizes and types of the redundant-multithreading (SRT) core
// slice with Delay Dispatching Dependent Instructions (DDDI).
//
// The machine runs eight hardware threads: four independent programs, each
// executed twice. Threads 0..NUM_PAIRS-1 are the master (leading) copies and
// thread p+NUM_PAIRS is the slave (trailing) copy of master p; this numbering
// is a choice of this design. The counts below (8 threads, 64 shared rename
// registers, 8-wide dispatch and issue, 4 load/store units, 96-entry ROBs)
// follow the evaluated processor configuration; the 64-bit data and PC width
// and the instruction record layout are this design's own choices.
package dddi_pkg;

  parameter int unsigned NUM_THREADS = 8;
  parameter int unsigned NUM_PAIRS   = NUM_THREADS / 2;
  parameter int unsigned NUM_PREGS   = 64;
  parameter int unsigned ROB_SIZE    = 96;
  parameter int unsigned XLEN        = 64;
  parameter int unsigned MACHINE_W   = 8;   // fetch / dispatch / issue width
  parameter int unsigned LSU_N       = 4;   // load/store units

  localparam int unsigned TID_W  = $clog2(NUM_THREADS);
  localparam int unsigned PREG_W = $clog2(NUM_PREGS);
  localparam int unsigned ROB_W  = $clog2(ROB_SIZE);

  typedef enum logic [1:0] {
    OP_ALU    = 2'd0,
    OP_LOAD   = 2'd1,
    OP_STORE  = 2'd2,
    OP_BRANCH = 2'd3
  } op_class_e;

  // One source operand: a rename-register tag, or no register operand at all.
  typedef struct packed {
    logic              valid;
    logic [PREG_W-1:0] tag;
  } src_t;

  // A renamed instruction as it travels from the rename stage through
  // dispatch and the instruction queue to the functional units.
  typedef struct packed {
    logic [TID_W-1:0]  tid;
    logic [XLEN-1:0]   pc;
    op_class_e         op;
    logic              dst_valid;
    logic [PREG_W-1:0] dst;
    src_t [1:0]        src;
    logic [ROB_W-1:0]  rob_idx;
  } inst_t;

  function automatic logic is_master(input logic [TID_W-1:0] tid);
    return 32'(tid) < NUM_PAIRS;
  endfunction

  // Distance of a ROB index from the ROB head (its age; 0 = oldest).
  function automatic logic [ROB_W-1:0] rob_age(input logic [ROB_W-1:0] idx,
                                               input logic [ROB_W-1:0] head);
    logic [ROB_W:0] d;
    d = {1'b0, idx} - {1'b0, head};
    if (idx < head) d = d + (ROB_W+1)'(ROB_SIZE);
    return d[ROB_W-1:0];
  endfunction

endpackage
