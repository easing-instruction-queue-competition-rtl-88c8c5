// dddi_dispatch: dispatch stage with Delay Dispatching Dependent Instructions.
//
// Each cycle up to DISP_W renamed instructions move from the threads' private
// instruction windows into the shared instruction queue, limited by the
// queue's free entries. Threads are visited in a rotating order (the first
// thread visited advances by one every cycle); within a thread, instructions
// go in program order. DDDI: before a master-thread instruction is
// dispatched, the miss bits of its source rename registers are read. If any
// is set, the instruction depends on a load that missed in the D-cache and
// has not returned, so dispatching from this thread stops for the cycle and
// the next thread is visited. Slave threads take their load values from the
// load value queue and never miss, so they are never held back. With dddi_en
// low the stage behaves like the baseline SRT dispatch.
// The skip rule follows the DDDI description; the rotating thread order and
// packing of the dispatched instructions into the low slots are this design's
// choices.
// Interface: fq_valid[t] must be a contiguous run of ones from slot 0;
// fq_take[t] tells the window how many of its oldest instructions left this
// cycle. blocked[t] flags a thread stopped by DDDI. Combinational from inputs
// to outputs; only the rotating pointer is a register.
module dddi_dispatch
  import dddi_pkg::*;
#(
  parameter int unsigned DISP_W  = MACHINE_W,
  parameter int unsigned IQ_SIZE = 32
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   dddi_en,
  input  inst_t [NUM_THREADS-1:0][DISP_W-1:0]    fq_inst,
  input  logic  [NUM_THREADS-1:0][DISP_W-1:0]    fq_valid,
  output logic  [NUM_THREADS-1:0][$clog2(DISP_W+1)-1:0] fq_take,
  input  logic  [$clog2(IQ_SIZE+1)-1:0]          iq_free,
  input  logic  [NUM_PREGS-1:0]                  miss_bits,
  output logic  [DISP_W-1:0]                     disp_valid,
  output inst_t [DISP_W-1:0]                     disp_inst,
  output logic  [NUM_THREADS-1:0]                blocked
);

  localparam int unsigned CNT_W = $clog2(DISP_W+1);

  logic [TID_W-1:0] start;

  function automatic logic depends_on_miss(input inst_t in, input logic [NUM_PREGS-1:0] mb);
    logic d;
    d = 1'b0;
    for (int s = 0; s < 2; s++)
      if (in.src[s].valid && mb[in.src[s].tag]) d = 1'b1;
    return d;
  endfunction

  logic [31:0] slot, limit, t;
  logic        stop;

  always_comb begin
    disp_valid = '0;
    disp_inst  = '0;
    fq_take    = '0;
    blocked    = '0;
    slot  = 0;
    limit = (32'(iq_free) < DISP_W) ? 32'(iq_free) : DISP_W;
    for (int k = 0; k < int'(NUM_THREADS); k++) begin
      t    = (32'(start) + 32'(k)) % NUM_THREADS;
      stop = 1'b0;
      for (int j = 0; j < int'(DISP_W); j++) begin
        if (!stop && slot < limit && fq_valid[t][j]) begin
          if (dddi_en && is_master(TID_W'(t)) && depends_on_miss(fq_inst[t][j], miss_bits)) begin
            stop       = 1'b1;
            blocked[t] = 1'b1;
          end else begin
            disp_valid[slot] = 1'b1;
            disp_inst[slot]  = fq_inst[t][j];
            fq_take[t]       = fq_take[t] + CNT_W'(1);
            slot             = slot + 1;
          end
        end else begin
          stop = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start <= '0;
    else        start <= TID_W'((32'(start) + 1) % NUM_THREADS);
  end

endmodule
