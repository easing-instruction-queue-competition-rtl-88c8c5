// tb_branch_outcome_queue: checks the BOQ of one redundant pair at its full
// depth of 160. Master branch outcomes are pushed at random with phases that
// fill and drain the queue; the slave pops in order and must get each
// branch's direction and target back. A slave branch PC that differs from the
// master's must raise pc_fault. A SystemVerilog queue is the reference.
module tb_branch_outcome_queue;
  import dddi_pkg::*;
  localparam int DEPTH = 160;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic m_push, m_ready, m_taken, s_pop, s_ready, s_taken, pc_fault;
  logic [XLEN-1:0] m_pc, m_target, s_pc, s_target;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [2*XLEN:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_fault = 0;

  branch_outcome_queue dut (.clk, .rst_n, .m_push, .m_pc, .m_taken, .m_target, .m_ready,
    .s_pop, .s_pc, .s_taken, .s_target, .s_ready, .pc_fault, .count);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p_push, p_pop;
    m_push = 0; s_pop = 0; m_pc = '0; m_taken = 0; m_target = '0; s_pc = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < 8000; c++) begin
      case ((c / 1000) % 3)
        0: begin p_push = 90; p_pop = 10; end
        1: begin p_push = 10; p_pop = 90; end
        default: begin p_push = 50; p_pop = 50; end
      endcase
      m_push = ($urandom % 100) < p_push;
      m_pc = {$urandom, $urandom}; m_taken = $urandom % 2; m_target = {$urandom, $urandom};
      s_pop  = ($urandom % 100) < p_pop;
      s_pc = (model.size() > 0) ? model[0][2*XLEN:XLEN+1] : '0;
      if (($urandom % 50) == 0) s_pc = s_pc + 64'd4;
      #1;
      checks++; if (m_ready !== (model.size() < DEPTH)) failures++;
      checks++; if (s_ready !== (model.size() > 0)) failures++;
      checks++; if (int'(count) != model.size()) failures++;
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      if (s_pop && model.size() > 0) begin
        checks++; if (s_taken !== model[0][XLEN] || s_target !== model[0][XLEN-1:0]) failures++;
        checks++; if (pc_fault !== (s_pc != model[0][2*XLEN:XLEN+1])) failures++;
        if (pc_fault) n_fault++;
      end else begin
        checks++; if (pc_fault !== 1'b0) failures++;
      end
      @(posedge clk);
      begin
        bit pop_ok, push_ok;
        pop_ok = s_pop && model.size() > 0;
        push_ok = m_push && model.size() < DEPTH;
        if (pop_ok) void'(model.pop_front());
        if (push_ok) model.push_back({m_pc, m_taken, m_target});
      end
      @(negedge clk);
    end
    checks++; if (n_full == 0 || n_empty == 0 || n_fault == 0) failures++;
    $display("full %0d empty %0d faults %0d", n_full, n_empty, n_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
