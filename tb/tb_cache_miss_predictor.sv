// tb_cache_miss_predictor: checks the 2-bit saturating hit/miss predictor.
// A reference table of counters is trained with the same random outcomes;
// every prediction port is compared with it each cycle. A directed part
// checks that a PC that always misses is predicted to miss after two
// trainings, and back to hit after two hits, and that counters saturate.
module tb_cache_miss_predictor;
  import dddi_pkg::*;
  localparam int E = 2048, P = MACHINE_W, U = LSU_N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [P-1:0][XLEN-1:0] pred_pc; logic [P-1:0] pred_miss;
  logic [U-1:0] upd_valid; logic [U-1:0][XLEN-1:0] upd_pc; logic [U-1:0] upd_miss;
  int ref_ctr [E];
  int checks = 0, failures = 0;

  cache_miss_predictor dut (.clk, .rst_n, .pred_pc, .pred_miss, .upd_valid, .upd_pc, .upd_miss);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ix(logic [XLEN-1:0] pc); return int'(pc[12:2]); endfunction

  task automatic train(input logic [XLEN-1:0] pc, input logic m);
    @(negedge clk);
    upd_valid = '0; upd_valid[0] = 1; upd_pc[0] = pc; upd_miss[0] = m;
    if (m && ref_ctr[ix(pc)] < 3) ref_ctr[ix(pc)]++;
    if (!m && ref_ctr[ix(pc)] > 0) ref_ctr[ix(pc)]--;
    @(posedge clk); #1; upd_valid = '0;
  endtask

  task automatic expect_pred(input logic [XLEN-1:0] pc, input logic exp);
    pred_pc[0] = pc; #1;
    checks++;
    if (pred_miss[0] !== exp) begin failures++; $display("pc %h predicted %b expected %b", pc, pred_miss[0], exp); end
  endtask

  initial begin
    logic [XLEN-1:0] pcs [16];
    for (int e = 0; e < E; e++) ref_ctr[e] = 0;
    upd_valid = '0; upd_pc = '0; upd_miss = '0; pred_pc = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // directed
    expect_pred(64'h1000, 0);
    train(64'h1000, 1); expect_pred(64'h1000, 0);
    train(64'h1000, 1); expect_pred(64'h1000, 1);
    train(64'h1000, 1); train(64'h1000, 1); train(64'h1000, 1);
    train(64'h1000, 0); expect_pred(64'h1000, 1);
    train(64'h1000, 0); expect_pred(64'h1000, 0);
    train(64'h1000, 0); train(64'h1000, 0); train(64'h1000, 1); expect_pred(64'h1000, 0);
    // random, 16 PCs with distinct indices, several update ports per cycle
    for (int k = 0; k < 16; k++) pcs[k] = {40'h0, 24'(k * 4 + 64'h20000 + k * 512)};
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      for (int u = 0; u < U; u++) begin
        int k; k = (u * 4) + int'($urandom % 4);  // distinct PCs per port
        upd_valid[u] = $urandom % 2; upd_pc[u] = pcs[k]; upd_miss[u] = ($urandom % 4) < (k % 4);
        if (upd_valid[u]) begin
          if (upd_miss[u] && ref_ctr[ix(pcs[k])] < 3) ref_ctr[ix(pcs[k])]++;
          if (!upd_miss[u] && ref_ctr[ix(pcs[k])] > 0) ref_ctr[ix(pcs[k])]--;
        end
      end
      @(posedge clk); #1;
      for (int p = 0; p < P; p++) pred_pc[p] = pcs[$urandom % 16];
      #1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (pred_miss[p] !== (ref_ctr[ix(pred_pc[p])] >= 2)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
