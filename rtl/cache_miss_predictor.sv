// cache_miss_predictor: L1 D-cache hit/miss predictor for loads.
//
// When a load leaves the instruction queue its PC is looked up here and the
// predicted outcome decides whether the DDDI bit of its destination register
// is set at once, instead of waiting for the cache to detect the miss. Like
// a bimodal branch predictor it is a PC-indexed table of 2-bit saturating
// counters (predict miss when the counter is 2 or 3), trained with the real
// outcome when the load completes. The table organisation, its size and the
// reset value (all counters 0, "hit") are this design's choices: the design
// only requires some cache-access predictor.
// Timing: prediction is combinational from pred_pc; training updates the
// counter at the next clock edge (if several ports train one counter in the
// same cycle, the highest-numbered port wins).
module cache_miss_predictor
  import dddi_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned PRED_N  = MACHINE_W,
  parameter int unsigned UPD_N   = LSU_N
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [PRED_N-1:0][XLEN-1:0] pred_pc,
  output logic [PRED_N-1:0]           pred_miss,
  input  logic [UPD_N-1:0]            upd_valid,
  input  logic [UPD_N-1:0][XLEN-1:0]  upd_pc,
  input  logic [UPD_N-1:0]            upd_miss
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic [1:0] ctr [ENTRIES];

  // Instructions are 4 bytes: drop the two low PC bits.
  function automatic logic [IDX_W-1:0] idx_of(input logic [XLEN-1:0] pc);
    return pc[IDX_W+1:2];
  endfunction

  always_comb
    for (int i = 0; i < int'(PRED_N); i++)
      pred_miss[i] = ctr[idx_of(pred_pc[i])][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(ENTRIES); e++) ctr[e] <= 2'd0;
    end else begin
      for (int i = 0; i < int'(UPD_N); i++)
        if (upd_valid[i]) begin
          if (upd_miss[i] && ctr[idx_of(upd_pc[i])] != 2'd3)
            ctr[idx_of(upd_pc[i])] <= ctr[idx_of(upd_pc[i])] + 2'd1;
          else if (!upd_miss[i] && ctr[idx_of(upd_pc[i])] != 2'd0)
            ctr[idx_of(upd_pc[i])] <= ctr[idx_of(upd_pc[i])] - 2'd1;
        end
    end
  end

endmodule
