// issue_queue: the instruction queue (IQ) shared by all eight threads.
//
// Dispatched instructions wait here until both source operands are ready,
// then are selected for execution. Entries are not partitioned between
// threads; any thread may fill the whole queue, which is the competition the
// DDDI dispatch rule relieves.
// Insert: the ins_valid slots (a contiguous run from slot 0) go to the
// lowest-numbered free entries. A source is ready at insert if it has no
// register, its rename register is ready, it is being written back this
// cycle, and it is not the destination of an earlier instruction of the same
// dispatch group.
// Wakeup: every writeback tag marks matching sources ready.
// Select: up to ISSUE_W ready entries per cycle, lowest entry first, with at
// most LSU_N loads/stores (the load/store unit count). Issued entries free at
// the next edge. free_cnt counts entries free at the start of the cycle, so
// an entry freed by issue is reused one cycle later.
// Squash: on a branch misprediction every entry of squash_tid younger than
// the branch (by ROB distance from squash_rob_head) is removed. An entry
// selected in the squash cycle itself still leaves on the issue port and
// must be discarded downstream by the thread's ROB.
// Sizes follow the evaluated configuration (32 entries, 8-wide issue, 4
// load/store units); position-based selection and the insert/wakeup timing
// are this design's choices.
module issue_queue
  import dddi_pkg::*;
#(
  parameter int unsigned IQ_SIZE = 32,
  parameter int unsigned DISP_W  = MACHINE_W,
  parameter int unsigned ISSUE_W = MACHINE_W,
  parameter int unsigned NUM_LSU = LSU_N,
  parameter int unsigned WB_N    = MACHINE_W + LSU_N
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic  [DISP_W-1:0]            ins_valid,
  input  inst_t [DISP_W-1:0]            ins_inst,
  input  logic  [NUM_PREGS-1:0]         preg_ready,
  input  logic  [WB_N-1:0]              wb_valid,
  input  logic  [WB_N-1:0][PREG_W-1:0]  wb_tag,
  input  logic                          squash_valid,
  input  logic  [TID_W-1:0]             squash_tid,
  input  logic  [ROB_W-1:0]             squash_rob_idx,
  input  logic  [ROB_W-1:0]             squash_rob_head,
  output logic  [ISSUE_W-1:0]           iss_valid,
  output inst_t [ISSUE_W-1:0]           iss_inst,
  output logic  [$clog2(IQ_SIZE+1)-1:0] free_cnt,
  output logic  [NUM_THREADS-1:0][$clog2(IQ_SIZE+1)-1:0] thr_cnt
);

  localparam int unsigned CNT_W = $clog2(IQ_SIZE+1);

  typedef struct packed {
    logic       valid;
    logic [1:0] rdy;
    inst_t      inst;
  } entry_t;

  entry_t q [IQ_SIZE];
  entry_t q_n [IQ_SIZE];

  function automatic logic woken(input logic [PREG_W-1:0] tag,
                                 input logic [WB_N-1:0] v,
                                 input logic [WB_N-1:0][PREG_W-1:0] tags);
    logic w;
    w = 1'b0;
    for (int i = 0; i < int'(WB_N); i++)
      if (v[i] && tags[i] == tag) w = 1'b1;
    return w;
  endfunction

  // Occupancy counts.
  always_comb begin
    free_cnt = '0;
    thr_cnt  = '0;
    for (int e = 0; e < int'(IQ_SIZE); e++) begin
      if (!q[e].valid) free_cnt = free_cnt + CNT_W'(1);
      else             thr_cnt[q[e].inst.tid] = thr_cnt[q[e].inst.tid] + CNT_W'(1);
    end
  end

  // Select.
  logic [IQ_SIZE-1:0] picked;
  int unsigned        n, nmem, nfree;
  logic               is_mem, r;

  always_comb begin
    iss_valid = '0;
    iss_inst  = '0;
    picked    = '0;
    n    = 0;
    nmem = 0;
    for (int e = 0; e < int'(IQ_SIZE); e++) begin
      is_mem = (q[e].inst.op == OP_LOAD) || (q[e].inst.op == OP_STORE);
      if (q[e].valid && (&q[e].rdy) && n < ISSUE_W && (!is_mem || nmem < NUM_LSU)) begin
        iss_valid[n] = 1'b1;
        iss_inst[n]  = q[e].inst;
        picked[e]    = 1'b1;
        n            = n + 1;
        if (is_mem) nmem = nmem + 1;
      end
    end
  end

  // Next state: remove issued and squashed, wake up, insert.
  always_comb begin
    nfree = 0;
    r     = 1'b0;
    for (int e = 0; e < int'(IQ_SIZE); e++) begin
      q_n[e] = q[e];
      if (picked[e]) q_n[e].valid = 1'b0;
      if (squash_valid && q[e].valid && q[e].inst.tid == squash_tid &&
          rob_age(q[e].inst.rob_idx, squash_rob_head) > rob_age(squash_rob_idx, squash_rob_head))
        q_n[e].valid = 1'b0;
      for (int s = 0; s < 2; s++)
        if (q[e].inst.src[s].valid && woken(q[e].inst.src[s].tag, wb_valid, wb_tag))
          q_n[e].rdy[s] = 1'b1;
      if (!q[e].valid) begin
        if (nfree < DISP_W && ins_valid[nfree]) begin
          q_n[e].valid = 1'b1;
          q_n[e].inst  = ins_inst[nfree];
          for (int s = 0; s < 2; s++) begin
            r = !ins_inst[nfree].src[s].valid ||
                preg_ready[ins_inst[nfree].src[s].tag] ||
                woken(ins_inst[nfree].src[s].tag, wb_valid, wb_tag);
            for (int j = 0; j < int'(DISP_W); j++)
              if (j < int'(nfree) && ins_valid[j] && ins_inst[j].dst_valid &&
                  ins_inst[nfree].src[s].valid &&
                  ins_inst[j].dst == ins_inst[nfree].src[s].tag)
                r = 1'b0;
            q_n[e].rdy[s] = r;
          end
        end
        nfree = nfree + 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(IQ_SIZE); e++) q[e] <= '0;
    end else begin
      for (int e = 0; e < int'(IQ_SIZE); e++) q[e] <= q_n[e];
    end
  end

endmodule
