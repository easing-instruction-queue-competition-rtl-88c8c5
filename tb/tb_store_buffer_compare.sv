// tb_store_buffer_compare: checks the comparing store buffer of one pair.
// Phase 1 (fault free): master stores are pushed at random, filling the
// buffer to its 160 entries at times; the slave presents the same stores in
// order, and the data cache stalls now and then. Each store must reach
// mem_wr_* exactly once, in order, in the cycle of its slave copy, and only
// then. Phase 2: the slave presents one corrupted store; fault must rise,
// the store must not be written, and the buffer must stop accepting slave
// stores while the fault is held.
module tb_store_buffer_compare;
  import dddi_pkg::*;
  localparam int DEPTH = 160;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic m_push, m_ready, s_valid, s_ready, mem_wr_valid, mem_wr_ready, fault;
  logic [XLEN-1:0] m_addr, m_data, s_addr, s_data, mem_wr_addr, mem_wr_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [2*XLEN-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_wr = 0, n_stall = 0;

  store_buffer_compare dut (.clk, .rst_n, .m_push, .m_addr, .m_data, .m_ready,
    .s_valid, .s_addr, .s_data, .s_ready, .mem_wr_valid, .mem_wr_addr, .mem_wr_data,
    .mem_wr_ready, .fault, .count);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p_push, p_pop;
    m_push = 0; s_valid = 0; m_addr = '0; m_data = '0; s_addr = '0; s_data = '0; mem_wr_ready = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      case ((c / 1000) % 3)
        0: begin p_push = 90; p_pop = 10; end
        1: begin p_push = 10; p_pop = 90; end
        default: begin p_push = 50; p_pop = 50; end
      endcase
      m_push = ($urandom % 100) < p_push;
      m_addr = {$urandom, $urandom}; m_data = {$urandom, $urandom};
      s_valid = ($urandom % 100) < p_pop && model.size() > 0;
      {s_addr, s_data} = (model.size() > 0) ? model[0] : '0;
      mem_wr_ready = ($urandom % 8) != 0;
      #1;
      checks++; if (m_ready !== (model.size() < DEPTH)) failures++;
      checks++; if (s_ready !== (model.size() > 0 && mem_wr_ready)) failures++;
      checks++; if (mem_wr_valid !== (s_valid && s_ready)) failures++;
      if (mem_wr_valid) begin
        checks++; if ({mem_wr_addr, mem_wr_data} !== model[0]) failures++;
      end
      checks++; if (fault !== 1'b0) failures++;
      if (model.size() == DEPTH) n_full++;
      if (s_valid && !mem_wr_ready) n_stall++;
      @(posedge clk);
      begin
        bit pop_ok, push_ok;
        pop_ok = s_valid && model.size() > 0 && mem_wr_ready;
        push_ok = m_push && model.size() < DEPTH;
        if (pop_ok) begin void'(model.pop_front()); n_wr++; end
        if (push_ok) model.push_back({m_addr, m_data});
      end
      @(negedge clk);
    end
    // fault injection
    m_push = 1; m_addr = 64'h100; m_data = 64'h55; s_valid = 0; mem_wr_ready = 1;
    @(posedge clk); @(negedge clk);
    m_push = 0;
    while (model.size() > 0) begin
      s_valid = 1; {s_addr, s_data} = model[0];
      @(posedge clk); void'(model.pop_front()); @(negedge clk);
    end
    s_valid = 1; s_addr = 64'h100; s_data = 64'h54; #1;
    checks++; if (mem_wr_valid !== 1'b0) failures++;
    @(posedge clk); @(negedge clk);
    checks++; if (fault !== 1'b1) failures++;
    s_data = 64'h55; #1;
    checks++; if (s_ready !== 1'b0 || mem_wr_valid !== 1'b0) failures++;
    checks++; if (count != 1) failures++;
    checks++; if (n_full == 0 || n_wr == 0 || n_stall == 0) failures++;
    $display("full %0d writes %0d stalls %0d", n_full, n_wr, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
