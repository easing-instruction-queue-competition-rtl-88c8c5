// tb_srt_dddi_top: end-to-end test of the SRT/DDDI slice at its default
// (full) parameters.
//
// The testbench plays everything around the slice: per-thread rename (a
// 64-entry free pool with per-thread ownership), a 96-entry ROB limit per
// thread, functional units (1-2 cycle results), and an L1 D-cache in which
// some master-thread load PCs always miss (MISS_LAT cycles, with the miss
// reported two cycles after issue) while the rest hit in two cycles. Slave
// loads take their values from the load value queue and complete in one
// cycle. Now and then a master thread suffers a branch misprediction and is
// squashed. Five synthetic workload mixes, standing in for the evaluated
// ILP, MIX1, MIX2, MIX3 and MEM mixes, set 0 to 4 of the pairs to run
// memory-bound programs; each mix runs first with DDDI off (baseline SRT),
// then with DDDI on, and cycles and IQ residence are printed.
//
// Checked every cycle: the miss bits equal an independent model of the DDDI
// set/clear rules; no instruction issues before its sources are written; no
// master instruction is dispatched while one of its sources has a pending
// miss (DDDI on); a thread flagged as blocked really has a dependent
// instruction next; queue free and per-thread counts; every instruction
// (not squashed) issues exactly once. The SRT queues of all four pairs are
// driven in parallel: load values, branch outcomes and store releases are
// compared with reference queues, slack fetch is obeyed, and one corrupted
// slave store must raise the store fault of its pair.
// Mechanisms that must each happen at least once: DDDI block, full queue,
// predicted-miss set, cache-reported miss, squash, LVQ/BOQ/STB full, store
// release, store fault, slack hold.
module tb_srt_dddi_top;
  import dddi_pkg::*;
  localparam int D = MACHINE_W, IW = MACHINE_W, L = LSU_N, Q = 32, NP = NUM_PAIRS;
  localparam int CW = $clog2(D+1), QW = $clog2(Q+1), FW = $clog2(MACHINE_W+1);
  localparam int MISS_LAT = 80;
  localparam int NINST = 6000;      // instructions per run
  localparam int MAXI = NINST + 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // DUT ports
  logic dddi_en;
  inst_t [NUM_THREADS-1:0][D-1:0] fq_inst;
  logic  [NUM_THREADS-1:0][D-1:0] fq_valid;
  logic  [NUM_THREADS-1:0][CW-1:0] fq_take;
  logic  [NUM_THREADS-1:0] dddi_blocked;
  logic  [IW-1:0] iss_valid, iss_pred_miss; inst_t [IW-1:0] iss_inst;
  logic  [IW-1:0] fu_wb_valid; logic [IW-1:0][PREG_W-1:0] fu_wb_tag;
  logic  [L-1:0] dc_miss_valid, ld_done_valid, ld_done_missed;
  logic  [L-1:0][PREG_W-1:0] dc_miss_tag, ld_done_tag; logic [L-1:0][TID_W-1:0] ld_done_tid; logic [L-1:0][XLEN-1:0] ld_done_pc;
  logic  squash_valid; logic [TID_W-1:0] squash_tid; logic [ROB_W-1:0] squash_rob_idx, squash_rob_head;
  logic  [NUM_PREGS-1:0] squash_preg_mask, preg_miss;
  logic  [QW-1:0] iq_free; logic [NUM_THREADS-1:0][QW-1:0] iq_thr_cnt;
  logic  [NP-1:0] lvq_m_push, lvq_m_ready, lvq_s_pop, lvq_s_ready, lvq_fault;
  logic  [NP-1:0][XLEN-1:0] lvq_m_addr, lvq_m_data, lvq_s_addr, lvq_s_data;
  logic  [NP-1:0] boq_m_push, boq_m_taken, boq_m_ready, boq_s_pop, boq_s_taken, boq_s_ready, boq_fault;
  logic  [NP-1:0][XLEN-1:0] boq_m_pc, boq_m_target, boq_s_pc, boq_s_target;
  logic  [NP-1:0] stb_m_push, stb_m_ready, stb_s_valid, stb_s_ready, mem_wr_valid, mem_wr_ready, stb_fault;
  logic  [NP-1:0][XLEN-1:0] stb_m_addr, stb_m_data, stb_s_addr, stb_s_data, mem_wr_addr, mem_wr_data;
  logic  [NP-1:0][FW-1:0] sf_m_fetched, sf_s_fetched, sf_s_fetch_max;
  logic  [NP-1:0] sf_drain, sf_s_fetch_en;

  srt_dddi_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_block = 0, n_iqfull = 0, n_predset = 0, n_dcmiss = 0, n_squash = 0, n_lddone = 0;
  int n_lvq_full = 0, n_boq_full = 0, n_stb_full = 0, n_stb_wr = 0, n_stb_fault = 0, n_slack_hold = 0;
  int n_lvq_pop = 0, n_boq_pop = 0, n_onethread = 0;

  function automatic void fail(string m);
    failures++;
    if (failures < 10) $display("cycle %0d: %s", cyc, m);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- core model
  typedef enum int {S_WIN, S_IQ, S_EXEC, S_DONE, S_SQUASHED} st_e;
  inst_t   ins   [MAXI];
  st_e     st    [MAXI];
  int      seq   [MAXI];
  int      t_disp[MAXI], t_iss[MAXI];
  int      win   [NUM_THREADS][$];
  int      nseq  [NUM_THREADS];
  int      recent[NUM_THREADS][$];
  bit      live  [NUM_PREGS];
  bit      vready[NUM_PREGS];
  int      owner [NUM_PREGS];
  int      refs  [NUM_PREGS];
  logic [NUM_PREGS-1:0] mmiss;       // model of the DDDI bits
  // pending events: id and due cycle
  int ev_wb_id[$], ev_wb_due[$], ev_ld_id[$], ev_ld_due[$], ev_dm_id[$], ev_dm_due[$];
  int ngen, nissued, nsq;

  // Workload mix: the last n_mem_pairs pairs run memory-bound programs
  // (3 of their 8 load PCs always miss), the others compute-bound ones (1 of 8).
  int n_mem_pairs = 2;

  function automatic bit is_miss_pc(int t, int k);
    return (t < NUM_PAIRS) && (k < ((t >= NUM_PAIRS - n_mem_pairs) ? 3 : 1));
  endfunction

  int openq [NUM_THREADS][$];     // ids of a thread in program order, oldest first

  function automatic int oldest_open(int t);
    while (openq[t].size() > 0 && st[openq[t][0]] inside {S_DONE, S_SQUASHED}) void'(openq[t].pop_front());
    return openq[t].size() > 0 ? seq[openq[t][0]] : nseq[t];
  endfunction

  function automatic bit any_open();
    for (int t = 0; t < NUM_THREADS; t++) if (oldest_open(t) != nseq[t]) return 1;
    return 0;
  endfunction

  task automatic gen_thread(int t);
    while (win[t].size() < D && ngen < NINST) begin
      inst_t x; int d, r, k;
      if (nseq[t] - oldest_open(t) >= ROB_SIZE - 1) return;
      d = -1;
      for (int r0 = 0; r0 < NUM_PREGS; r0++) begin
        r = (r0 + int'($urandom % NUM_PREGS)) % NUM_PREGS;
        if (!live[r] && refs[r] == 0) begin d = r; break; end
      end
      x = '0;
      x.tid = TID_W'(t);
      r = $urandom % 100;
      x.op = (r < 25) ? OP_LOAD : (r < 35) ? OP_STORE : (r < 45) ? OP_BRANCH : OP_ALU;
      if (x.op inside {OP_LOAD, OP_ALU}) begin
        if (d < 0) return;
        x.dst_valid = 1; x.dst = PREG_W'(d);
      end
      k = (x.op == OP_LOAD) ? int'($urandom % 8) : 8 + int'($urandom % 100);
      x.pc = {32'(ngen), 32'((t % NUM_PAIRS) * 32'h400 + k * 4)};
      for (int s = 0; s < ((x.op == OP_LOAD) ? 1 : 2); s++) begin
        int j; j = $urandom % 4;
        if (j < recent[t].size() && live[recent[t][j]] && owner[recent[t][j]] == t) begin
          x.src[s].valid = 1; x.src[s].tag = PREG_W'(recent[t][j]); refs[recent[t][j]]++;
        end
      end
      x.rob_idx = ROB_W'(nseq[t] % ROB_SIZE);
      ins[ngen] = x; st[ngen] = S_WIN; seq[ngen] = nseq[t]; nseq[t]++;
      if (x.dst_valid) begin
        live[d] = 1; owner[d] = t; vready[d] = 0;
        recent[t].push_front(d); if (recent[t].size() > 4) void'(recent[t].pop_back());
      end
      win[t].push_back(ngen);
      openq[t].push_back(ngen);
      ngen++;
    end
  endtask

  function automatic int id_of(inst_t x); return int'(x.pc[63:32]); endfunction

  task automatic drop_refs(int id);
    for (int s = 0; s < 2; s++) if (ins[id].src[s].valid) refs[ins[id].src[s].tag]--;
  endtask

  // one run of NINST instructions; returns cycles taken
  task automatic run(input bit en, output int cycles, output real res_m, output real res_s);
    int sq_t, sq_cut, c0, sum_m, sum_s, nm, ns;
    bit sq_now;
    logic [NUM_PREGS-1:0] sq_mask;
    // reset the model
    ngen = 0; nissued = 0; nsq = 0;
    for (int t = 0; t < NUM_THREADS; t++) begin win[t].delete(); recent[t].delete(); openq[t].delete(); nseq[t] = 0; end
    for (int r = 0; r < NUM_PREGS; r++) begin live[r] = 0; vready[r] = 1; owner[r] = -1; refs[r] = 0; end
    mmiss = '0;
    ev_wb_id.delete(); ev_wb_due.delete(); ev_ld_id.delete(); ev_ld_due.delete(); ev_dm_id.delete(); ev_dm_due.delete();
    dddi_en = en;
    fq_valid = '0; fq_inst = '0; fu_wb_valid = '0; dc_miss_valid = '0; ld_done_valid = '0;
    squash_valid = 0; squash_preg_mask = '0; squash_tid = '0; squash_rob_idx = '0; squash_rob_head = '0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    c0 = cyc;
    while (ngen < NINST || any_open() || ev_wb_id.size() + ev_ld_id.size() > 0) begin
      // ---- drive writebacks, cache events
      fu_wb_valid = '0; dc_miss_valid = '0; ld_done_valid = '0;
      begin
        int k; k = 0;
        for (int i = 0; i < ev_wb_id.size(); i++)
          if (ev_wb_due[i] <= cyc && k < IW) begin fu_wb_valid[k] = 1; fu_wb_tag[k] = ins[ev_wb_id[i]].dst; k++; end
        k = 0;
        for (int i = 0; i < ev_ld_id.size(); i++)
          if (ev_ld_due[i] <= cyc && k < L) begin
            int id; id = ev_ld_id[i];
            ld_done_valid[k] = 1; ld_done_tag[k] = ins[id].dst; ld_done_tid[k] = ins[id].tid; ld_done_pc[k] = ins[id].pc;
            ld_done_missed[k] = is_miss_pc(int'(ins[id].tid), int'(ins[id].pc[31:2] % 8)); k++;
          end
        k = 0;
        for (int i = 0; i < ev_dm_id.size(); i++)
          if (ev_dm_due[i] <= cyc && k < L) begin dc_miss_valid[k] = 1; dc_miss_tag[k] = ins[ev_dm_id[i]].dst; k++; end
      end
      // ---- maybe a branch misprediction in a master thread
      sq_now = 0; sq_mask = '0;
      if ((cyc % 211) == 100) begin
        int o;
        sq_t = $urandom % NUM_PAIRS;
        o = oldest_open(sq_t);
        sq_cut = nseq[sq_t] - 6;
        if (win[sq_t].size() > 0 && seq[win[sq_t][0]] - 1 < sq_cut) sq_cut = seq[win[sq_t][0]] - 1;
        if (sq_cut > o && nseq[sq_t] - o < ROB_SIZE) begin
          sq_now = 1;
          squash_tid = TID_W'(sq_t); squash_rob_head = ROB_W'(o % ROB_SIZE);
          squash_rob_idx = ROB_W'(sq_cut % ROB_SIZE);
          for (int i = 0; i < ngen; i++)
            if (int'(ins[i].tid) == sq_t && seq[i] > sq_cut && st[i] inside {S_WIN, S_IQ, S_EXEC} && ins[i].dst_valid)
              sq_mask[ins[i].dst] = 1;
        end
      end
      squash_valid = sq_now; squash_preg_mask = sq_mask;
      // ---- refill windows and present them
      for (int t = 0; t < NUM_THREADS; t++) gen_thread(t);
      fq_valid = '0;
      for (int t = 0; t < NUM_THREADS; t++)
        for (int j = 0; j < D; j++)
          if (j < win[t].size() && !(sq_now && t == sq_t)) begin fq_valid[t][j] = 1; fq_inst[t][j] = ins[win[t][j]]; end
      #1;
      // ---- checks
      checks++; if (preg_miss !== mmiss) fail($sformatf("miss bits %h model %h", preg_miss, mmiss));
      begin
        int occ; int tc [NUM_THREADS];
        occ = 0; for (int t = 0; t < NUM_THREADS; t++) tc[t] = 0;
        for (int i = 0; i < ngen; i++) if (st[i] == S_IQ) begin occ++; tc[ins[i].tid]++; end
        checks++; if (int'(iq_free) != Q - occ) fail($sformatf("iq free %0d model %0d", iq_free, Q - occ));
        for (int t = 0; t < NUM_THREADS; t++) begin
          checks++; if (int'(iq_thr_cnt[t]) != tc[t]) fail("thread count");
          if (tc[t] == Q) n_onethread++;
        end
        if (occ == Q) n_iqfull++;
      end
      for (int t = 0; t < NUM_THREADS; t++) begin
        for (int j = 0; j < int'(fq_take[t]); j++) begin
          int id; id = win[t][j];
          for (int s = 0; s < 2; s++)
            if (en && t < NUM_PAIRS && ins[id].src[s].valid && mmiss[ins[id].src[s].tag]) begin
              checks++; fail("dispatched a dependant of a pending miss");
            end
        end
        checks++;
        if (dddi_blocked[t]) begin
          int id; bit dep; dep = 0;
          n_block++;
          if (int'(fq_take[t]) >= win[t].size()) fail("blocked without instruction");
          else begin
            id = win[t][fq_take[t]];
            for (int s = 0; s < 2; s++) if (ins[id].src[s].valid && mmiss[ins[id].src[s].tag]) dep = 1;
            if (!dep || !en || t >= NUM_PAIRS) fail("blocked without a dependency on a miss");
          end
        end
      end
      for (int i = 0; i < IW; i++) if (iss_valid[i]) begin
        int id; id = id_of(iss_inst[i]);
        checks++;
        if (id >= ngen || st[id] != S_IQ) fail($sformatf("issued id %0d not in the queue", id));
        for (int s = 0; s < 2; s++)
          if (iss_inst[i].src[s].valid && !vready[iss_inst[i].src[s].tag]) fail("issued before its source was written");
      end
      // ---- clock edge: update the model
      @(posedge clk);
      cyc++;
      // writebacks / cache events consumed
      begin
        int k;
        k = 0;
        for (int i = 0; i < ev_wb_id.size(); i++)
          if (ev_wb_due[i] <= cyc - 1 && k < IW) begin
            vready[ins[ev_wb_id[i]].dst] = 1; st[ev_wb_id[i]] = S_DONE; k++;
            ev_wb_id.delete(i); ev_wb_due.delete(i); i--;
          end
        k = 0;
        for (int i = 0; i < ev_ld_id.size(); i++)
          if (ev_ld_due[i] <= cyc - 1 && k < L) begin
            vready[ins[ev_ld_id[i]].dst] = 1; st[ev_ld_id[i]] = S_DONE; k++; n_lddone++;
            ev_ld_id.delete(i); ev_ld_due.delete(i); i--;
          end
        k = 0;
        for (int i = 0; i < ev_dm_id.size(); i++)
          if (ev_dm_due[i] <= cyc - 1 && k < L) begin
            k++; n_dcmiss++;
            ev_dm_id.delete(i); ev_dm_due.delete(i); i--;
          end
      end
      // miss-bit model: sets, then clears win
      begin
        logic [NUM_PREGS-1:0] clr; clr = sq_mask;
        for (int i = 0; i < IW; i++)
          if (iss_valid[i] && iss_inst[i].op == OP_LOAD && int'(iss_inst[i].tid) < NUM_PAIRS && iss_pred_miss[i]) begin
            mmiss[iss_inst[i].dst] = 1; n_predset++;
          end
        for (int i = 0; i < L; i++) if (dc_miss_valid[i]) mmiss[dc_miss_tag[i]] = 1;
        for (int i = 0; i < L; i++) if (ld_done_valid[i]) clr[ld_done_tag[i]] = 1;
        for (int t = 0; t < NUM_THREADS; t++)
          for (int j = 0; j < int'(fq_take[t]); j++)
            if (ins[win[t][j]].dst_valid) clr[ins[win[t][j]].dst] = 1;
        mmiss = mmiss & ~clr;
      end
      // issue
      for (int i = 0; i < IW; i++) if (iss_valid[i]) begin
        int id, t, k;
        id = id_of(iss_inst[i]); t = int'(iss_inst[i].tid);
        if (id < ngen && st[id] == S_IQ) begin
          drop_refs(id); t_iss[id] = cyc - 1;
          if (sq_now && t == sq_t && seq[id] > sq_cut) begin
            st[id] = S_EXEC;       // selected in the squash cycle: killed below
          end else begin
            nissued++;
            if (!ins[id].dst_valid) st[id] = S_DONE;
          else if (ins[id].op == OP_LOAD) begin
            st[id] = S_EXEC;
            k = int'(ins[id].pc[31:2] % 8);
            ev_ld_id.push_back(id);
            if (t >= NUM_PAIRS)          ev_ld_due.push_back(cyc);            // value from the LVQ
            else if (is_miss_pc(t, k)) begin
              ev_ld_due.push_back(cyc - 1 + MISS_LAT);
              ev_dm_id.push_back(id); ev_dm_due.push_back(cyc + 1);
            end else                     ev_ld_due.push_back(cyc + 1);
          end else begin
            st[id] = S_EXEC;
            ev_wb_id.push_back(id); ev_wb_due.push_back(cyc + int'($urandom % 2));
          end
          end
        end
      end
      // dispatch
      for (int t = 0; t < NUM_THREADS; t++)
        for (int j = 0; j < int'(fq_take[t]); j++) begin
          int id; id = win[t].pop_front();
          st[id] = S_IQ; t_disp[id] = cyc - 1;
        end
      // squash
      if (sq_now) begin
        n_squash++;
        for (int i = 0; i < ngen; i++)
          if (int'(ins[i].tid) == sq_t && seq[i] > sq_cut && st[i] inside {S_WIN, S_IQ, S_EXEC}) begin
            if (st[i] inside {S_WIN, S_IQ}) drop_refs(i);
            st[i] = S_SQUASHED; nsq++;
            if (ins[i].dst_valid) begin live[ins[i].dst] = 0; vready[ins[i].dst] = 1; end
            for (int e = 0; e < ev_wb_id.size(); e++) if (ev_wb_id[e] == i) begin ev_wb_id.delete(e); ev_wb_due.delete(e); e--; end
            for (int e = 0; e < ev_ld_id.size(); e++) if (ev_ld_id[e] == i) begin ev_ld_id.delete(e); ev_ld_due.delete(e); e--; end
            for (int e = 0; e < ev_dm_id.size(); e++) if (ev_dm_id[e] == i) begin ev_dm_id.delete(e); ev_dm_due.delete(e); e--; end
          end
        win[sq_t].delete();
        nseq[sq_t] = sq_cut + 1;
        recent[sq_t].delete();
      end
      // free old registers
      for (int r = 0; r < NUM_PREGS; r++)
        if (live[r] && vready[r] && refs[r] == 0 && ($urandom % 4) == 0) begin
          bit rec; rec = 0;
          foreach (recent[owner[r]][j]) if (recent[owner[r]][j] == r) rec = 1;
          if (!rec) live[r] = 0;
        end
      if (cyc - c0 > 0 && (cyc - c0) % 20000 == 0)
        $display("run at %0d cycles: generated %0d issued %0d squashed %0d iq_free %0d events %0d/%0d", cyc - c0, ngen, nissued, nsq, iq_free, ev_wb_id.size(), ev_ld_id.size());
      @(negedge clk);
    end
    cycles = cyc - c0;
    // every instruction accounted for
    sum_m = 0; sum_s = 0; nm = 0; ns = 0;
    for (int i = 0; i < ngen; i++) begin
      checks++;
      if (!(st[i] inside {S_DONE, S_SQUASHED})) fail($sformatf("id %0d left in state %0d", i, st[i]));
      if (st[i] == S_DONE) begin
        if (int'(ins[i].tid) < NUM_PAIRS) begin sum_m += t_iss[i] - t_disp[i]; nm++; end
        else begin sum_s += t_iss[i] - t_disp[i]; ns++; end
      end
    end
    res_m = real'(sum_m) / real'(nm > 0 ? nm : 1);
    res_s = real'(sum_s) / real'(ns > 0 ? ns : 1);
  endtask

  // ---------------------------------------------------------------- SRT queues
  logic [2*XLEN-1:0] lvq_m [NP][$];
  logic [2*XLEN:0]   boq_m [NP][$];
  logic [2*XLEN-1:0] stb_m [NP][$];
  int sf_lag [NP];
  bit srt_go = 0, srt_inject = 0;

  initial begin
    lvq_m_push = '0; lvq_s_pop = '0; boq_m_push = '0; boq_s_pop = '0; stb_m_push = '0; stb_s_valid = '0;
    lvq_m_addr = '0; lvq_m_data = '0; lvq_s_addr = '0; boq_m_pc = '0; boq_m_taken = '0; boq_m_target = '0;
    boq_s_pc = '0; stb_m_addr = '0; stb_m_data = '0; stb_s_addr = '0; stb_s_data = '0; mem_wr_ready = '1;
    sf_m_fetched = '0; sf_s_fetched = '0; sf_drain = '0;
    for (int p = 0; p < NP; p++) sf_lag[p] = 0;
    wait (srt_go);
    forever begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        // bursty: fill for 600 cycles, then drain for 600
        bit fill; fill = ((cyc / 600) % 2) == 0;
        lvq_m_push[p] = ($urandom % 100) < (fill ? 60 : 10);
        lvq_m_addr[p] = {$urandom, $urandom}; lvq_m_data[p] = {$urandom, $urandom};
        lvq_s_pop[p]  = ($urandom % 100) < (fill ? 10 : 60);
        lvq_s_addr[p] = lvq_m[p].size() > 0 ? lvq_m[p][0][2*XLEN-1:XLEN] : '0;
        boq_m_push[p] = ($urandom % 100) < (fill ? 60 : 10);
        boq_m_pc[p] = {$urandom, $urandom}; boq_m_taken[p] = $urandom % 2; boq_m_target[p] = {$urandom, $urandom};
        boq_s_pop[p]  = ($urandom % 100) < (fill ? 10 : 60);
        boq_s_pc[p] = boq_m[p].size() > 0 ? boq_m[p][0][2*XLEN:XLEN+1] : '0;
        stb_m_push[p] = ($urandom % 100) < (fill ? 60 : 10);
        stb_m_addr[p] = {$urandom, $urandom}; stb_m_data[p] = {$urandom, $urandom};
        stb_s_valid[p] = (($urandom % 100) < (fill ? 10 : 60)) && stb_m[p].size() > 0;
        {stb_s_addr[p], stb_s_data[p]} = stb_m[p].size() > 0 ? stb_m[p][0] : '0;
        if (srt_inject && p == NP - 1 && stb_m[p].size() > 0) begin
          stb_s_valid[p] = 1; stb_s_data[p] = ~stb_s_data[p];
        end
        mem_wr_ready[p] = ($urandom % 10) != 0;
        sf_m_fetched[p] = FW'($urandom % (MACHINE_W + 1));
      end
      #1;
      if (rst_n) for (int p = 0; p < NP; p++) begin
        int allow;
        allow = sf_lag[p] >= 128 ? ((sf_lag[p] - 128) < MACHINE_W ? sf_lag[p] - 128 : MACHINE_W) : 0;
        checks++; if (int'(sf_s_fetch_max[p]) != allow) fail("slack fetch limit");
        if (allow == 0) n_slack_hold++;
        sf_s_fetched[p] = sf_s_fetch_max[p];
        checks++; if (lvq_m_ready[p] !== (lvq_m[p].size() < 160)) fail("lvq ready");
        checks++; if (boq_m_ready[p] !== (boq_m[p].size() < 160)) fail("boq ready");
        checks++; if (stb_m_ready[p] !== (stb_m[p].size() < 160)) fail("stb ready");
        if (lvq_m[p].size() == 160) n_lvq_full++;
        if (boq_m[p].size() == 160) n_boq_full++;
        if (stb_m[p].size() == 160) n_stb_full++;
        if (lvq_s_pop[p] && lvq_m[p].size() > 0) begin
          checks++; if (lvq_s_data[p] !== lvq_m[p][0][XLEN-1:0] || lvq_fault[p]) fail("lvq value");
        end
        if (boq_s_pop[p] && boq_m[p].size() > 0) begin
          checks++; if ({boq_s_taken[p], boq_s_target[p]} !== boq_m[p][0][XLEN:0] || boq_fault[p]) fail("boq outcome");
        end
        if (!(srt_inject && p == NP - 1)) begin
          checks++;
          if (mem_wr_valid[p] !== (stb_s_valid[p] && mem_wr_ready[p] && stb_m[p].size() > 0)) fail("store release");
          else if (mem_wr_valid[p] && {mem_wr_addr[p], mem_wr_data[p]} !== stb_m[p][0]) fail("store data");
        end else begin
          checks++; if (mem_wr_valid[p]) fail("corrupted store released");
        end
      end
      @(posedge clk);
      if (!rst_n) begin
        for (int p = 0; p < NP; p++) begin lvq_m[p].delete(); boq_m[p].delete(); stb_m[p].delete(); sf_lag[p] = 0; end
        sf_s_fetched = '0;
      end else for (int p = 0; p < NP; p++) begin
        bit lp, bp, sp;
        sf_lag[p] += int'(sf_m_fetched[p]) - int'(sf_s_fetched[p]);
        lp = lvq_m_push[p] && lvq_m[p].size() < 160;
        bp = boq_m_push[p] && boq_m[p].size() < 160;
        sp = stb_m_push[p] && stb_m[p].size() < 160 && !(srt_inject && p == NP - 1);
        if (lvq_s_pop[p] && lvq_m[p].size() > 0) begin void'(lvq_m[p].pop_front()); n_lvq_pop++; end
        if (lp) lvq_m[p].push_back({lvq_m_addr[p], lvq_m_data[p]});
        if (boq_s_pop[p] && boq_m[p].size() > 0) begin void'(boq_m[p].pop_front()); n_boq_pop++; end
        if (bp) boq_m[p].push_back({boq_m_pc[p], boq_m_taken[p], boq_m_target[p]});
        if (mem_wr_valid[p]) begin void'(stb_m[p].pop_front()); n_stb_wr++; end
        if (sp) stb_m[p].push_back({stb_m_addr[p], stb_m_data[p]});
      end
    end
  end

  // ---------------------------------------------------------------- main
  initial begin
    int cyc_off, cyc_on;
    real rm_off, rs_off, rm_on, rs_on;
    string mix_name [5] = '{"ILP  (4 ILP, 0 MEM)", "MIX1 (3 ILP, 1 MEM)", "MIX2 (2 ILP, 2 MEM)",
                           "MIX3 (1 ILP, 3 MEM)", "MEM  (0 ILP, 4 MEM)"};
    dddi_en = 0;
    srt_go = 1;
    for (int mix = 0; mix < 5; mix++) begin
      int b0;
      n_mem_pairs = mix;
      b0 = n_block;
      run(0, cyc_off, rm_off, rs_off);
      checks++; if (n_block != b0) fail("blocking with DDDI off");
      run(1, cyc_on, rm_on, rs_on);
      $display("%s: cycles off %0d on %0d (throughput x%0.3f); IQ residence master %0.2f -> %0.2f, slave %0.2f -> %0.2f",
               mix_name[mix], cyc_off, cyc_on, real'(cyc_off) / real'(cyc_on), rm_off, rm_on, rs_off, rs_on);
    end
    // store fault on the last pair
    while (stb_m[NP-1].size() == 0) @(posedge clk);
    @(negedge clk); srt_inject = 1;
    repeat (4) @(posedge clk);
    #1; checks++; if (stb_fault[NP-1] !== 1'b1) fail("store fault not raised");
    else n_stb_fault++;
    checks++; if (stb_fault[NP-2:0] !== '0) fail("store fault on a fault-free pair");
    $display("mechanisms: block %0d iq_full %0d one_thread_full %0d pred_set %0d dc_miss %0d ld_done %0d squash %0d",
             n_block, n_iqfull, n_onethread, n_predset, n_dcmiss, n_lddone, n_squash);
    $display("srt: lvq_full %0d boq_full %0d stb_full %0d lvq_pop %0d boq_pop %0d stb_release %0d stb_fault %0d slack_hold %0d",
             n_lvq_full, n_boq_full, n_stb_full, n_lvq_pop, n_boq_pop, n_stb_wr, n_stb_fault, n_slack_hold);
    checks++; if (n_block == 0)     fail("DDDI never blocked a thread");
    checks++; if (n_iqfull == 0)    fail("queue never full");
    checks++; if (n_predset == 0)   fail("no predicted miss");
    checks++; if (n_dcmiss == 0)    fail("no cache-reported miss");
    checks++; if (n_squash == 0)    fail("no squash");
    checks++; if (n_lvq_full == 0 || n_boq_full == 0 || n_stb_full == 0) fail("an SRT queue never filled");
    checks++; if (n_stb_wr == 0 || n_slack_hold == 0) fail("no store release or slack hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
