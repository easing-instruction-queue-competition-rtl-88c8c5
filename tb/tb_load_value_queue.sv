// tb_load_value_queue: checks the LVQ of one redundant pair at its full depth
// of 160. Master pushes and slave pops are random, with bursts that fill the
// queue (m_ready must drop at exactly 160 entries) and drain it (s_ready must
// drop when empty). A SystemVerilog queue is the reference: every slave pop
// must return the master's value in order; a slave address that differs from
// the master's must raise addr_fault, a matching one must not.
module tb_load_value_queue;
  import dddi_pkg::*;
  localparam int DEPTH = 160;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic m_push, m_ready, s_pop, s_ready, addr_fault;
  logic [XLEN-1:0] m_addr, m_data, s_addr, s_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [2*XLEN-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_fault = 0;

  load_value_queue dut (.clk, .rst_n, .m_push, .m_addr, .m_data, .m_ready,
                        .s_pop, .s_addr, .s_data, .s_ready, .addr_fault, .count);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p_push, p_pop;
    m_push = 0; s_pop = 0; m_addr = '0; m_data = '0; s_addr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < 8000; c++) begin
      // phases: fill, drain, mixed
      case ((c / 1000) % 3)
        0: begin p_push = 90; p_pop = 10; end
        1: begin p_push = 10; p_pop = 90; end
        default: begin p_push = 50; p_pop = 50; end
      endcase
      m_push = ($urandom % 100) < p_push;
      m_addr = {$urandom, $urandom}; m_data = {$urandom, $urandom};
      s_pop  = ($urandom % 100) < p_pop;
      s_addr = (model.size() > 0) ? model[0][2*XLEN-1:XLEN] : '0;
      if (($urandom % 50) == 0) s_addr = s_addr ^ 64'h8;
      #1;
      checks++; if (m_ready !== (model.size() < DEPTH)) failures++;
      checks++; if (s_ready !== (model.size() > 0)) failures++;
      checks++; if (int'(count) != model.size()) failures++;
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      if (s_pop && model.size() > 0) begin
        checks++; if (s_data !== model[0][XLEN-1:0]) failures++;
        checks++; if (addr_fault !== (s_addr != model[0][2*XLEN-1:XLEN])) failures++;
        if (addr_fault) n_fault++;
      end else begin
        checks++; if (addr_fault !== 1'b0) failures++;
      end
      @(posedge clk);
      begin
        bit pop_ok, push_ok;
        pop_ok = s_pop && model.size() > 0;
        push_ok = m_push && model.size() < DEPTH;
        if (pop_ok) void'(model.pop_front());
        if (push_ok) model.push_back({m_addr, m_data});
      end
      @(negedge clk);
    end
    checks++; if (n_full == 0 || n_empty == 0 || n_fault == 0) failures++;
    $display("full %0d empty %0d faults %0d", n_full, n_empty, n_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
