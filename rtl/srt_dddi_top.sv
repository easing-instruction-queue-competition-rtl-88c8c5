// srt_dddi_top: dispatch/issue slice of an eight-thread Simultaneous and
// Redundantly Threaded (SRT) processor with DDDI, plus the SRT structures of
// its four redundant thread pairs.
//
// Core slice. Renamed instructions of the eight threads enter dddi_dispatch,
// which moves up to DISP_W per cycle into the shared issue_queue. Each
// rename register carries a ready bit and the DDDI miss bit (rrf_status).
// When a master-thread load issues, cache_miss_predictor looks up its PC; a
// predicted miss sets the miss bit of the load's destination at once, and a
// miss the L1 D-cache reports later (dc_miss_*) sets it too. While that bit
// is set, dispatch will not move an instruction reading the register into
// the queue, and instead turns to the next thread. Load completion
// (ld_done_*) clears the bit, wakes dependants and, for master loads,
// trains the predictor;
// a branch misprediction (squash_*) clears the bits of squashed registers
// and removes the thread's younger queue entries.
// SRT queues. For each pair p (master thread p, slave thread p+NUM_PAIRS)
// there is a load value queue, a branch outcome queue, a comparing store
// buffer and a slack-fetch controller. Their master side is fed at master
// commit and their slave side at slave fetch/execute/commit; those pipeline
// stages (fetch, rename, ROB, LSQ, functional units, caches) lie outside
// this RTL, so every signal to them is a port.
// Timing: dispatch, select and predictor lookup are combinational within a
// cycle; all state changes at the rising clock edge. rst_n is asynchronous,
// active low.
// Follows the document: thread count and pairing, queue sizes (IQ 32, LVQ /
// BOQ / STB 160, slack 128), machine width, the DDDI set/clear/skip rules.
// This design's choices: data widths, handshakes, thread numbering, rotating
// dispatch order, position-based issue select.
module srt_dddi_top
  import dddi_pkg::*;
#(
  parameter int unsigned IQ_SIZE     = 32,
  parameter int unsigned DISP_W      = MACHINE_W,
  parameter int unsigned ISSUE_W     = MACHINE_W,
  parameter int unsigned NUM_LSU     = LSU_N,
  parameter int unsigned QUEUE_DEPTH = 160,
  parameter int unsigned SLACK       = 128,
  parameter int unsigned PRED_ENTRIES = 2048
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dddi_en,

  // renamed instruction windows, one per thread
  input  inst_t [NUM_THREADS-1:0][DISP_W-1:0] fq_inst,
  input  logic  [NUM_THREADS-1:0][DISP_W-1:0] fq_valid,
  output logic  [NUM_THREADS-1:0][$clog2(DISP_W+1)-1:0] fq_take,
  output logic  [NUM_THREADS-1:0]             dddi_blocked,

  // issue to the functional units
  output logic  [ISSUE_W-1:0]                 iss_valid,
  output inst_t [ISSUE_W-1:0]                 iss_inst,
  output logic  [ISSUE_W-1:0]                 iss_pred_miss,

  // writeback of non-load results
  input  logic  [ISSUE_W-1:0]                 fu_wb_valid,
  input  logic  [ISSUE_W-1:0][PREG_W-1:0]     fu_wb_tag,

  // L1 D-cache: miss detected, load completed
  input  logic  [NUM_LSU-1:0]                 dc_miss_valid,
  input  logic  [NUM_LSU-1:0][PREG_W-1:0]     dc_miss_tag,
  input  logic  [NUM_LSU-1:0]                 ld_done_valid,
  input  logic  [NUM_LSU-1:0][PREG_W-1:0]     ld_done_tag,
  input  logic  [NUM_LSU-1:0][TID_W-1:0]      ld_done_tid,
  input  logic  [NUM_LSU-1:0][XLEN-1:0]       ld_done_pc,
  input  logic  [NUM_LSU-1:0]                 ld_done_missed,

  // branch misprediction recovery (from the ROB)
  input  logic                                squash_valid,
  input  logic  [TID_W-1:0]                   squash_tid,
  input  logic  [ROB_W-1:0]                   squash_rob_idx,
  input  logic  [ROB_W-1:0]                   squash_rob_head,
  input  logic  [NUM_PREGS-1:0]               squash_preg_mask,

  // status
  output logic  [$clog2(IQ_SIZE+1)-1:0]       iq_free,
  output logic  [NUM_THREADS-1:0][$clog2(IQ_SIZE+1)-1:0] iq_thr_cnt,
  output logic  [NUM_PREGS-1:0]               preg_miss,

  // load value queues
  input  logic  [NUM_PAIRS-1:0]               lvq_m_push,
  input  logic  [NUM_PAIRS-1:0][XLEN-1:0]     lvq_m_addr,
  input  logic  [NUM_PAIRS-1:0][XLEN-1:0]     lvq_m_data,
  output logic  [NUM_PAIRS-1:0]               lvq_m_ready,
  input  logic  [NUM_PAIRS-1:0]               lvq_s_pop,
  input  logic  [NUM_PAIRS-1:0][XLEN-1:0]     lvq_s_addr,
  output logic  [NUM_PAIRS-1:0][XLEN-1:0]     lvq_s_data,
  output logic  [NUM_PAIRS-1:0]               lvq_s_ready,
  output logic  [NUM_PAIRS-1:0]               lvq_fault,

  // branch outcome queues
  input  logic  [NUM_PAIRS-1:0]               boq_m_push,
  input  logic  [NUM_PAIRS-1:0][XLEN-1:0]     boq_m_pc,
  input  logic  [NUM_PAIRS-1:0]               boq_m_taken,
  input  logic  [NUM_PAIRS-1:0][XLEN-1:0]     boq_m_target,
  output logic  [NUM_PAIRS-1:0]               boq_m_ready,
  input  logic  [NUM_PAIRS-1:0]               boq_s_pop,
  input  logic  [NUM_PAIRS-1:0][XLEN-1:0]     boq_s_pc,
  output logic  [NUM_PAIRS-1:0]               boq_s_taken,
  output logic  [NUM_PAIRS-1:0][XLEN-1:0]     boq_s_target,
  output logic  [NUM_PAIRS-1:0]               boq_s_ready,
  output logic  [NUM_PAIRS-1:0]               boq_fault,

  // store buffers with output comparison
  input  logic  [NUM_PAIRS-1:0]               stb_m_push,
  input  logic  [NUM_PAIRS-1:0][XLEN-1:0]     stb_m_addr,
  input  logic  [NUM_PAIRS-1:0][XLEN-1:0]     stb_m_data,
  output logic  [NUM_PAIRS-1:0]               stb_m_ready,
  input  logic  [NUM_PAIRS-1:0]               stb_s_valid,
  input  logic  [NUM_PAIRS-1:0][XLEN-1:0]     stb_s_addr,
  input  logic  [NUM_PAIRS-1:0][XLEN-1:0]     stb_s_data,
  output logic  [NUM_PAIRS-1:0]               stb_s_ready,
  output logic  [NUM_PAIRS-1:0]               mem_wr_valid,
  output logic  [NUM_PAIRS-1:0][XLEN-1:0]     mem_wr_addr,
  output logic  [NUM_PAIRS-1:0][XLEN-1:0]     mem_wr_data,
  input  logic  [NUM_PAIRS-1:0]               mem_wr_ready,
  output logic  [NUM_PAIRS-1:0]               stb_fault,

  // slack fetch
  input  logic  [NUM_PAIRS-1:0][$clog2(MACHINE_W+1)-1:0] sf_m_fetched,
  input  logic  [NUM_PAIRS-1:0][$clog2(MACHINE_W+1)-1:0] sf_s_fetched,
  input  logic  [NUM_PAIRS-1:0]               sf_drain,
  output logic  [NUM_PAIRS-1:0]               sf_s_fetch_en,
  output logic  [NUM_PAIRS-1:0][$clog2(MACHINE_W+1)-1:0] sf_s_fetch_max
);

  localparam int unsigned WB_N = ISSUE_W + NUM_LSU;

  logic  [DISP_W-1:0]             disp_valid;
  inst_t [DISP_W-1:0]             disp_inst;
  logic  [DISP_W-1:0]             alloc_valid;
  logic  [DISP_W-1:0][PREG_W-1:0] alloc_tag;
  logic  [WB_N-1:0]               wb_valid;
  logic  [WB_N-1:0][PREG_W-1:0]   wb_tag;
  logic  [ISSUE_W-1:0]            pred_set_valid;
  logic  [ISSUE_W-1:0][PREG_W-1:0] pred_set_tag;
  logic  [ISSUE_W-1:0][XLEN-1:0]  iss_pc;
  logic  [NUM_PREGS-1:0]          preg_ready;
  logic  [NUM_LSU-1:0]            train_valid;

  assign wb_valid = {ld_done_valid, fu_wb_valid};
  assign wb_tag   = {ld_done_tag, fu_wb_tag};

  always_comb
    for (int i = 0; i < int'(DISP_W); i++) begin
      alloc_valid[i] = disp_valid[i] && disp_inst[i].dst_valid;
      alloc_tag[i]   = disp_inst[i].dst;
    end

  // Only master loads access the D-cache; slave loads read the LVQ and must
  // not train the predictor (they share their master's PCs).
  always_comb
    for (int i = 0; i < int'(NUM_LSU); i++)
      train_valid[i] = ld_done_valid[i] && is_master(ld_done_tid[i]);

  always_comb
    for (int i = 0; i < int'(ISSUE_W); i++) begin
      iss_pc[i]         = iss_inst[i].pc;
      pred_set_valid[i] = iss_valid[i] && iss_inst[i].op == OP_LOAD &&
                          iss_inst[i].dst_valid && is_master(iss_inst[i].tid) &&
                          iss_pred_miss[i];
      pred_set_tag[i]   = iss_inst[i].dst;
    end

  dddi_dispatch #(.DISP_W(DISP_W), .IQ_SIZE(IQ_SIZE)) u_dispatch (
    .clk, .rst_n, .dddi_en,
    .fq_inst, .fq_valid, .fq_take,
    .iq_free, .miss_bits(preg_miss),
    .disp_valid, .disp_inst,
    .blocked(dddi_blocked)
  );

  rrf_status #(.ALLOC_N(DISP_W), .WB_N(WB_N), .SET_N(ISSUE_W), .LD_N(NUM_LSU)) u_rrf_status (
    .clk, .rst_n,
    .alloc_valid, .alloc_tag,
    .wb_valid, .wb_tag,
    .pred_set_valid, .pred_set_tag,
    .dc_miss_valid, .dc_miss_tag,
    .ld_done_valid, .ld_done_tag,
    .squash_mask(squash_valid ? squash_preg_mask : '0),
    .ready(preg_ready), .miss(preg_miss)
  );

  issue_queue #(.IQ_SIZE(IQ_SIZE), .DISP_W(DISP_W), .ISSUE_W(ISSUE_W),
                .NUM_LSU(NUM_LSU), .WB_N(WB_N)) u_iq (
    .clk, .rst_n,
    .ins_valid(disp_valid), .ins_inst(disp_inst),
    .preg_ready, .wb_valid, .wb_tag,
    .squash_valid, .squash_tid, .squash_rob_idx, .squash_rob_head,
    .iss_valid, .iss_inst,
    .free_cnt(iq_free), .thr_cnt(iq_thr_cnt)
  );

  cache_miss_predictor #(.ENTRIES(PRED_ENTRIES), .PRED_N(ISSUE_W), .UPD_N(NUM_LSU)) u_pred (
    .clk, .rst_n,
    .pred_pc(iss_pc), .pred_miss(iss_pred_miss),
    .upd_valid(train_valid), .upd_pc(ld_done_pc), .upd_miss(ld_done_missed)
  );

  for (genvar p = 0; p < int'(NUM_PAIRS); p++) begin : g_pair
    load_value_queue #(.DEPTH(QUEUE_DEPTH)) u_lvq (
      .clk, .rst_n,
      .m_push(lvq_m_push[p]), .m_addr(lvq_m_addr[p]), .m_data(lvq_m_data[p]),
      .m_ready(lvq_m_ready[p]),
      .s_pop(lvq_s_pop[p]), .s_addr(lvq_s_addr[p]), .s_data(lvq_s_data[p]),
      .s_ready(lvq_s_ready[p]), .addr_fault(lvq_fault[p]), .count()
    );
    branch_outcome_queue #(.DEPTH(QUEUE_DEPTH)) u_boq (
      .clk, .rst_n,
      .m_push(boq_m_push[p]), .m_pc(boq_m_pc[p]), .m_taken(boq_m_taken[p]),
      .m_target(boq_m_target[p]), .m_ready(boq_m_ready[p]),
      .s_pop(boq_s_pop[p]), .s_pc(boq_s_pc[p]), .s_taken(boq_s_taken[p]),
      .s_target(boq_s_target[p]), .s_ready(boq_s_ready[p]),
      .pc_fault(boq_fault[p]), .count()
    );
    store_buffer_compare #(.DEPTH(QUEUE_DEPTH)) u_stb (
      .clk, .rst_n,
      .m_push(stb_m_push[p]), .m_addr(stb_m_addr[p]), .m_data(stb_m_data[p]),
      .m_ready(stb_m_ready[p]),
      .s_valid(stb_s_valid[p]), .s_addr(stb_s_addr[p]), .s_data(stb_s_data[p]),
      .s_ready(stb_s_ready[p]),
      .mem_wr_valid(mem_wr_valid[p]), .mem_wr_addr(mem_wr_addr[p]),
      .mem_wr_data(mem_wr_data[p]), .mem_wr_ready(mem_wr_ready[p]),
      .fault(stb_fault[p]), .count()
    );
    slack_fetch #(.SLACK(SLACK), .FETCH_W(MACHINE_W)) u_sf (
      .clk, .rst_n,
      .m_fetched(sf_m_fetched[p]), .s_fetched(sf_s_fetched[p]),
      .drain(sf_drain[p]), .s_fetch_en(sf_s_fetch_en[p]),
      .s_fetch_max(sf_s_fetch_max[p]), .distance()
    );
  end

endmodule
