// rrf_status: status bits kept beside every shared rename register.
//
// ready[r] : the value of rename register r has been written back. Cleared
//            when r is handed to a newly dispatched producer, set by any
//            writeback port.
// miss[r]  : the DDDI bit. It is set when the load that writes r is predicted
//            to miss in the L1 D-cache as it leaves the instruction queue
//            (pred_set_*), or when the cache reports an actual miss for it
//            (dc_miss_*). It is cleared when that load completes
//            (ld_done_*), when r is squashed (squash_mask) after a branch
//            misprediction, or when r is reallocated.
// The set/clear rules follow the DDDI description; the separate ready bit,
// the reset values and "clear wins over set" within one cycle are this
// design's choices. All updates take effect at the next rising clock edge;
// both vectors are read combinationally by dispatch and the queue.
module rrf_status
  import dddi_pkg::*;
#(
  parameter int unsigned ALLOC_N = MACHINE_W,
  parameter int unsigned WB_N    = MACHINE_W + LSU_N,
  parameter int unsigned SET_N   = MACHINE_W,
  parameter int unsigned LD_N    = LSU_N
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [ALLOC_N-1:0]           alloc_valid,
  input  logic [ALLOC_N-1:0][PREG_W-1:0] alloc_tag,
  input  logic [WB_N-1:0]              wb_valid,
  input  logic [WB_N-1:0][PREG_W-1:0]  wb_tag,
  input  logic [SET_N-1:0]             pred_set_valid,
  input  logic [SET_N-1:0][PREG_W-1:0] pred_set_tag,
  input  logic [LD_N-1:0]              dc_miss_valid,
  input  logic [LD_N-1:0][PREG_W-1:0]  dc_miss_tag,
  input  logic [LD_N-1:0]              ld_done_valid,
  input  logic [LD_N-1:0][PREG_W-1:0]  ld_done_tag,
  input  logic [NUM_PREGS-1:0]         squash_mask,
  output logic [NUM_PREGS-1:0]         ready,
  output logic [NUM_PREGS-1:0]         miss
);

  logic [NUM_PREGS-1:0] ready_n, miss_n, clr;

  always_comb begin
    ready_n = ready;
    miss_n  = miss;
    clr     = squash_mask;
    for (int i = 0; i < int'(ALLOC_N); i++)
      if (alloc_valid[i]) begin
        ready_n[alloc_tag[i]] = 1'b0;
        clr[alloc_tag[i]]     = 1'b1;
      end
    for (int i = 0; i < int'(WB_N); i++)
      if (wb_valid[i]) ready_n[wb_tag[i]] = 1'b1;
    for (int i = 0; i < int'(SET_N); i++)
      if (pred_set_valid[i]) miss_n[pred_set_tag[i]] = 1'b1;
    for (int i = 0; i < int'(LD_N); i++)
      if (dc_miss_valid[i]) miss_n[dc_miss_tag[i]] = 1'b1;
    for (int i = 0; i < int'(LD_N); i++)
      if (ld_done_valid[i]) clr[ld_done_tag[i]] = 1'b1;
    miss_n = miss_n & ~clr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= '1;
      miss  <= '0;
    end else begin
      ready <= ready_n;
      miss  <= miss_n;
    end
  end

endmodule
