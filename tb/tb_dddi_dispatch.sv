// tb_dddi_dispatch: random test of the DDDI dispatch stage.
// Each cycle the eight thread windows get a random number of instructions
// with random source registers, a random set of rename registers has its
// miss bit set, and the free IQ count is random. A reference model walks the
// threads from the rotating start thread (0 after reset, +1 per cycle) and
// builds the expected dispatch group, per-thread take counts and DDDI block
// flags; all are compared. It also counts that blocking happened, that slave
// threads were never blocked and that dddi_en=0 disables blocking.
module tb_dddi_dispatch;
  import dddi_pkg::*;
  localparam int D = MACHINE_W, Q = 32, CW = $clog2(D+1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dddi_en;
  inst_t [NUM_THREADS-1:0][D-1:0] fq_inst;
  logic  [NUM_THREADS-1:0][D-1:0] fq_valid;
  logic  [NUM_THREADS-1:0][CW-1:0] fq_take;
  logic  [$clog2(Q+1)-1:0] iq_free;
  logic  [NUM_PREGS-1:0] miss_bits;
  logic  [D-1:0] disp_valid;
  inst_t [D-1:0] disp_inst;
  logic  [NUM_THREADS-1:0] blocked;
  int checks = 0, failures = 0;
  int n_block = 0, n_disp = 0, n_full_group = 0;

  dddi_dispatch dut (.clk, .rst_n, .dddi_en, .fq_inst, .fq_valid, .fq_take, .iq_free,
                     .miss_bits, .disp_valid, .disp_inst, .blocked);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic inst_t rand_inst(int t, int j);
    inst_t x;
    x = '0;
    x.tid = TID_W'(t);
    x.pc  = 64'(t * 64'h1000 + j * 4);
    x.op  = op_class_e'($urandom % 4);
    x.dst_valid = 1; x.dst = PREG_W'($urandom);
    for (int s = 0; s < 2; s++) begin x.src[s].valid = $urandom % 2; x.src[s].tag = PREG_W'($urandom); end
    x.rob_idx = ROB_W'(j);
    return x;
  endfunction

  initial begin
    int start, lim, n;
    inst_t exp_inst [$];
    int exp_take [NUM_THREADS];
    logic [NUM_THREADS-1:0] exp_blk;
    dddi_en = 1; fq_inst = '0; fq_valid = '0; iq_free = '0; miss_bits = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    start = 0;
    for (int c = 0; c < 4000; c++) begin
      dddi_en = (c % 1000) < 800;
      for (int t = 0; t < NUM_THREADS; t++) begin
        n = $urandom % (D + 1);
        for (int j = 0; j < D; j++) begin fq_valid[t][j] = j < n; fq_inst[t][j] = rand_inst(t, j); end
      end
      miss_bits = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      iq_free = ($clog2(Q+1))'($urandom % (Q + 1));
      // reference
      exp_inst.delete(); exp_blk = '0;
      lim = int'(iq_free) < D ? int'(iq_free) : D;
      for (int t = 0; t < NUM_THREADS; t++) exp_take[t] = 0;
      for (int k = 0; k < NUM_THREADS; k++) begin
        int t; t = (start + k) % NUM_THREADS;
        for (int j = 0; j < D; j++) begin
          logic dep;
          if (exp_inst.size() >= lim || !fq_valid[t][j]) break;
          dep = (fq_inst[t][j].src[0].valid && miss_bits[fq_inst[t][j].src[0].tag]) ||
                (fq_inst[t][j].src[1].valid && miss_bits[fq_inst[t][j].src[1].tag]);
          if (dddi_en && t < NUM_PAIRS && dep) begin exp_blk[t] = 1; break; end
          exp_inst.push_back(fq_inst[t][j]);
          exp_take[t]++;
        end
      end
      #1;
      for (int s = 0; s < D; s++) begin
        checks++;
        if (disp_valid[s] !== (s < exp_inst.size()) ||
            (s < exp_inst.size() && disp_inst[s] !== exp_inst[s])) begin
          failures++;
          if (failures < 5) $display("cycle %0d slot %0d mismatch", c, s);
        end
      end
      for (int t = 0; t < NUM_THREADS; t++) begin
        checks++;
        if (int'(fq_take[t]) != exp_take[t]) failures++;
      end
      checks++; if (blocked !== exp_blk) failures++;
      checks++; if (blocked[NUM_THREADS-1:NUM_PAIRS] != '0) failures++;
      checks++; if (!dddi_en && blocked != '0) failures++;
      if (blocked != '0) n_block++;
      if (exp_inst.size() == D) n_full_group++;
      n_disp += exp_inst.size();
      @(negedge clk);
      start = (start + 1) % NUM_THREADS;
    end
    checks++; if (n_block == 0 || n_full_group == 0) failures++;
    $display("blocked cycles %0d, full groups %0d, dispatched %0d", n_block, n_full_group, n_disp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
