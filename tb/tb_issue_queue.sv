// tb_issue_queue: self-checking test of the shared instruction queue.
// The testbench plays rename, functional units and ROB around the queue: it
// inserts random dependent instruction groups of all eight threads, keeps a
// ready scoreboard of rename registers, writes results back 1-3 cycles
// (loads 1-30 cycles) after issue, and now and then squashes a thread.
// Checked every cycle: no instruction issues before both sources are written
// back; each instruction issues at most once and only if not squashed; at
// most ISSUE_W issue with at most NUM_LSU loads/stores; the issue count
// equals what the ready entries allow (the queue never idles with ready work);
// free and per-thread counts match the model. Directed: an independent
// instruction put into an empty queue issues in the very next cycle.
// At the end every non-squashed instruction must have issued.
module tb_issue_queue;
  import dddi_pkg::*;
  localparam int Q = 32, D = MACHINE_W, IW = MACHINE_W, L = LSU_N, WB = MACHINE_W + LSU_N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [D-1:0] ins_valid; inst_t [D-1:0] ins_inst;
  logic  [NUM_PREGS-1:0] preg_ready;
  logic  [WB-1:0] wb_valid; logic [WB-1:0][PREG_W-1:0] wb_tag;
  logic  squash_valid; logic [TID_W-1:0] squash_tid; logic [ROB_W-1:0] squash_rob_idx, squash_rob_head;
  logic  [IW-1:0] iss_valid; inst_t [IW-1:0] iss_inst;
  logic  [$clog2(Q+1)-1:0] free_cnt;
  logic  [NUM_THREADS-1:0][$clog2(Q+1)-1:0] thr_cnt;

  issue_queue dut (.clk, .rst_n, .ins_valid, .ins_inst, .preg_ready, .wb_valid, .wb_tag,
    .squash_valid, .squash_tid, .squash_rob_idx, .squash_rob_head,
    .iss_valid, .iss_inst, .free_cnt, .thr_cnt);

  int checks = 0, failures = 0;
  int n_squash = 0, n_full = 0, n_dep_wait = 0;

  // model state
  inst_t inq [int];             // id -> instruction, in queue
  bit    done [int];
  bit    squashed [int];
  int    wb_due [NUM_PREGS];    // cycle a result arrives, -1 none
  bit    live [NUM_PREGS];      // allocated to an in-flight producer or recent value
  int    rob_next [NUM_THREADS];
  int    next_id = 0, cyc = 0;
  int    seq_of [int];
  int    refs [NUM_PREGS];
  int    owner [NUM_PREGS];
  int    recent [NUM_THREADS][$];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void fail(string m);
    failures++;
    if (failures < 8) $display("cycle %0d: %s", cyc, m);
  endfunction

  task automatic check_cycle();
    int nalu, nmem, ni, nim, occ; int tc [NUM_THREADS];
    nalu = 0; nmem = 0; ni = 0; nim = 0; occ = 0;
    for (int t = 0; t < NUM_THREADS; t++) tc[t] = 0;
    foreach (inq[id]) begin
      bit r; r = 1;
      occ++; tc[inq[id].tid]++;
      for (int s = 0; s < 2; s++)
        if (inq[id].src[s].valid && !preg_ready[inq[id].src[s].tag]) r = 0;
      if (r) begin
        if (inq[id].op inside {OP_LOAD, OP_STORE}) nmem++; else nalu++;
      end else n_dep_wait++;
    end
    checks++; if (int'(free_cnt) != Q - occ) fail($sformatf("free %0d model %0d", free_cnt, Q - occ));
    for (int t = 0; t < NUM_THREADS; t++) begin checks++; if (int'(thr_cnt[t]) != tc[t]) fail("thread count"); end
    if (occ == Q) n_full++;
    for (int i = 0; i < IW; i++) if (iss_valid[i]) begin
      int id; id = int'(iss_inst[i].pc);
      ni++;
      if (iss_inst[i].op inside {OP_LOAD, OP_STORE}) nim++;
      checks++;
      if (!inq.exists(id)) fail($sformatf("issued id %0d not in queue", id));
      else begin
        for (int s = 0; s < 2; s++)
          if (iss_inst[i].src[s].valid && !preg_ready[iss_inst[i].src[s].tag]) fail("issued before source ready");
        if (inq[id] !== iss_inst[i]) fail("issued record differs");
      end
    end
    checks++; if (nim > L) fail("too many memory issues");
    begin
      int expn; expn = nalu + (nmem < L ? nmem : L); if (expn > IW) expn = IW;
      checks++; if (ni != expn) begin fail($sformatf("issued %0d expected %0d", ni, expn));
      end
    end
  endtask

  initial begin
    for (int r = 0; r < NUM_PREGS; r++) begin wb_due[r] = -1; live[r] = 0; refs[r] = 0; end
    for (int t = 0; t < NUM_THREADS; t++) rob_next[t] = 0;
    ins_valid = '0; ins_inst = '0; preg_ready = '1; wb_valid = '0; wb_tag = '0;
    squash_valid = 0; squash_tid = '0; squash_rob_idx = '0; squash_rob_head = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;

    // directed latency check: empty queue, independent instruction
    ins_valid[0] = 1; ins_inst[0] = '0; ins_inst[0].pc = 64'd999999; ins_inst[0].op = OP_ALU;
    @(posedge clk); #1; ins_valid = '0;
    checks++; if (!(iss_valid[0] && iss_inst[0].pc == 64'd999999)) fail("latency: not issued next cycle");
    @(posedge clk); #1;
    checks++; if (free_cnt != Q) fail("latency: entry not freed");

    for (cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // writebacks due this cycle
      wb_valid = '0;
      begin
        int k; k = 0;
        for (int r = 0; r < NUM_PREGS; r++)
          if (wb_due[r] == cyc && k < WB) begin wb_valid[k] = 1; wb_tag[k] = PREG_W'(r); k++; wb_due[r] = -1; end
          else if (wb_due[r] == cyc) wb_due[r] = cyc + 1;
      end
      // random squash of one thread: everything of it younger than a point
      squash_valid = 0;
      if ((cyc % 97) == 50) begin
        int t, cut, oldest;
        t = $urandom % NUM_THREADS;
        cut = rob_next[t] > 4 ? rob_next[t] - 4 : 0;
        oldest = cut;
        foreach (inq[id]) if (int'(inq[id].tid) == t && seq_of[id] < oldest) oldest = seq_of[id];
        if (rob_next[t] - oldest < ROB_SIZE) begin
          squash_valid = 1; squash_tid = TID_W'(t);
          squash_rob_head = ROB_W'(oldest % ROB_SIZE);
          squash_rob_idx  = ROB_W'(cut % ROB_SIZE);
          foreach (inq[id]) if (int'(inq[id].tid) == t && seq_of[id] > cut) squashed[id] = 1;
          n_squash++;
        end
      end
      // new group: only as many as the queue has room for
      ins_valid = '0; ins_inst = '0;
      if (cyc < 5800 && squash_valid == 0) begin
        int n, fr;
        fr = int'(free_cnt); n = $urandom % (D + 1); if (n > fr) n = fr;
        for (int j = 0; j < n; j++) begin
          inst_t x; int t, d;
          t = $urandom % NUM_THREADS;
          // find a free rename register
          d = -1;
          for (int r0 = 0; r0 < NUM_PREGS; r0++) begin
            int r; r = (r0 + int'($urandom % NUM_PREGS)) % NUM_PREGS;
            if (!live[r] && preg_ready[r] && wb_due[r] < 0) begin d = r; break; end
          end
          if (d < 0) break;
          x = '0; x.tid = TID_W'(t); x.pc = 64'(next_id); x.op = op_class_e'($urandom % 4);
          x.dst_valid = 1; x.dst = PREG_W'(d);
          seq_of[next_id] = rob_next[t];
          x.rob_idx = ROB_W'(rob_next[t] % ROB_SIZE); rob_next[t]++;
          for (int s = 0; s < 2; s++) begin
            int k; k = $urandom % 4;
            x.src[s].valid = 0;
            if (k < recent[t].size() && live[recent[t][k]] && owner[recent[t][k]] == t) begin
              x.src[s].valid = 1; x.src[s].tag = PREG_W'(recent[t][k]);
              refs[recent[t][k]]++;
            end
          end
          ins_valid[j] = 1; ins_inst[j] = x;
          live[d] = 1; owner[d] = t;
          recent[t].push_front(d); if (recent[t].size() > 4) void'(recent[t].pop_back());
          next_id++;
        end
      end
      // retire old values at random so registers get reused
      for (int r = 0; r < NUM_PREGS; r++) if (live[r] && preg_ready[r] && refs[r] == 0 && ($urandom % 8) == 0) live[r] = 0;
      #1;
      check_cycle();
      @(posedge clk);
      // model update at the edge
      for (int i = 0; i < IW; i++) if (iss_valid[i]) begin
        int id; id = int'(iss_inst[i].pc);
        if (inq.exists(id)) begin
          for (int s = 0; s < 2; s++) if (iss_inst[i].src[s].valid) refs[iss_inst[i].src[s].tag]--;
          inq.delete(id); done[id] = 1;
          if (squashed.exists(id)) squashed.delete(id);  // selected in the squash cycle itself
          if (iss_inst[i].dst_valid)
            wb_due[iss_inst[i].dst] = cyc + 1 + int'(iss_inst[i].op == OP_LOAD ? $urandom % 30 : $urandom % 3);
        end
      end
      if (squash_valid) foreach (squashed[id]) if (inq.exists(id)) begin
        for (int s = 0; s < 2; s++) if (inq[id].src[s].valid) refs[inq[id].src[s].tag]--;
        preg_ready[inq[id].dst] = 1; live[inq[id].dst] = 0;
        inq.delete(id);
      end
      for (int k = 0; k < WB; k++) if (wb_valid[k]) preg_ready[wb_tag[k]] = 1;
      for (int j = 0; j < D; j++) if (ins_valid[j]) begin
        inq[int'(ins_inst[j].pc)] = ins_inst[j];
        preg_ready[ins_inst[j].dst] = 0;
      end
    end
    // everything not squashed has issued
    for (int id = 0; id < next_id; id++) begin
      checks++;
      if (!done.exists(id) && !squashed.exists(id)) fail($sformatf("id %0d never issued", id));
      if (done.exists(id) && squashed.exists(id)) fail($sformatf("squashed id %0d issued", id));
    end
    checks++; if (n_squash == 0 || n_full == 0 || n_dep_wait == 0) fail("a mechanism never happened");
    $display("issued %0d, squashes %0d, full cycles %0d", done.num(), n_squash, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
