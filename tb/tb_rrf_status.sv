// tb_rrf_status: random test of the rename-register status bits.
// Every cycle random allocations, writebacks, miss sets (predicted and
// detected), load completions and squash masks are applied; an independent
// reference model applies the documented rules (alloc clears both bits,
// writeback sets ready, a miss sets the DDDI bit, completion / squash /
// reallocation clear it, clears win) and the ready and miss vectors are
// compared after every clock edge.
module tb_rrf_status;
  import dddi_pkg::*;
  localparam int A = MACHINE_W, W = MACHINE_W + LSU_N, S = MACHINE_W, L = LSU_N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [A-1:0] alloc_valid; logic [A-1:0][PREG_W-1:0] alloc_tag;
  logic [W-1:0] wb_valid;    logic [W-1:0][PREG_W-1:0] wb_tag;
  logic [S-1:0] ps_valid;    logic [S-1:0][PREG_W-1:0] ps_tag;
  logic [L-1:0] dm_valid;    logic [L-1:0][PREG_W-1:0] dm_tag;
  logic [L-1:0] ld_valid;    logic [L-1:0][PREG_W-1:0] ld_tag;
  logic [NUM_PREGS-1:0] squash_mask, ready, miss;
  logic [NUM_PREGS-1:0] ref_ready, ref_miss;
  int checks = 0, failures = 0, cyc = 0;
  int n_set = 0, n_clr = 0;

  rrf_status dut (.clk, .rst_n, .alloc_valid, .alloc_tag, .wb_valid, .wb_tag,
    .pred_set_valid(ps_valid), .pred_set_tag(ps_tag), .dc_miss_valid(dm_valid),
    .dc_miss_tag(dm_tag), .ld_done_valid(ld_valid), .ld_done_tag(ld_tag),
    .squash_mask, .ready, .miss);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic randomize_inputs();
    for (int i = 0; i < A; i++) begin alloc_valid[i] = ($urandom % 8) == 0; alloc_tag[i] = PREG_W'($urandom); end
    for (int i = 0; i < W; i++) begin wb_valid[i] = ($urandom % 6) == 0; wb_tag[i] = PREG_W'($urandom); end
    for (int i = 0; i < S; i++) begin ps_valid[i] = ($urandom % 6) == 0; ps_tag[i] = PREG_W'($urandom); end
    for (int i = 0; i < L; i++) begin
      dm_valid[i] = ($urandom % 6) == 0; dm_tag[i] = PREG_W'($urandom);
      ld_valid[i] = ($urandom % 5) == 0; ld_tag[i] = PREG_W'($urandom);
    end
    squash_mask = (($urandom % 10) == 0) ? {$urandom, $urandom} & {$urandom, $urandom} : '0;
  endtask

  task automatic model();
    logic [NUM_PREGS-1:0] r, m, clr;
    r = ref_ready; m = ref_miss; clr = squash_mask;
    for (int i = 0; i < A; i++) if (alloc_valid[i]) begin r[alloc_tag[i]] = 0; clr[alloc_tag[i]] = 1; end
    for (int i = 0; i < W; i++) if (wb_valid[i]) r[wb_tag[i]] = 1;
    for (int i = 0; i < S; i++) if (ps_valid[i]) begin m[ps_tag[i]] = 1; n_set++; end
    for (int i = 0; i < L; i++) if (dm_valid[i]) begin m[dm_tag[i]] = 1; n_set++; end
    for (int i = 0; i < L; i++) if (ld_valid[i]) begin clr[ld_tag[i]] = 1; n_clr++; end
    ref_ready = r; ref_miss = m & ~clr;
  endtask

  initial begin
    alloc_valid = '0; wb_valid = '0; ps_valid = '0; dm_valid = '0; ld_valid = '0;
    alloc_tag = '0; wb_tag = '0; ps_tag = '0; dm_tag = '0; ld_tag = '0; squash_mask = '0;
    ref_ready = '1; ref_miss = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (ready !== '1 || miss !== '0) begin failures++; $display("reset values wrong"); end
    rst_n = 1;
    for (cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      randomize_inputs();
      model();
      @(posedge clk); #1;
      checks++;
      if (ready !== ref_ready || miss !== ref_miss) begin
        failures++;
        if (failures < 5) $display("cycle %0d: ready %h/%h miss %h/%h", cyc, ready, ref_ready, miss, ref_miss);
      end
    end
    checks++; if (n_set == 0 || n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
