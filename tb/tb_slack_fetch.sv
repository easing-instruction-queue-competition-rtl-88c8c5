// tb_slack_fetch: checks slack-fetch control at the default slack of 128.
// The master fetches 0-8 instructions per cycle at random; the slave fetches
// as many as allowed (or fewer, at random). A reference counter of the lag
// checks s_fetch_en and s_fetch_max every cycle, and that with the rule obeyed
// the lag never drops below 128 once reached. The slave must be held back
// (master <128 ahead) at the start, and after the master stops (drain) the
// slave must be able to catch up to a lag of zero.
module tb_slack_fetch;
  import dddi_pkg::*;
  localparam int SLACK = 128, FW = MACHINE_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [$clog2(FW+1)-1:0] m_fetched, s_fetched, s_fetch_max;
  logic drain, s_fetch_en;
  logic [15:0] distance;
  int checks = 0, failures = 0, lag = 0, n_hold = 0, reached = 0;

  slack_fetch dut (.clk, .rst_n, .m_fetched, .s_fetched, .drain, .s_fetch_en, .s_fetch_max, .distance);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int allow;
    m_fetched = '0; s_fetched = '0; drain = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      drain = c >= 5000;
      m_fetched = drain ? '0 : 4'($urandom % (FW + 1));
      allow = drain ? FW : (lag >= SLACK ? ((lag - SLACK) < FW ? lag - SLACK : FW) : 0);
      #1;
      checks++; if (int'(s_fetch_max) != allow || s_fetch_en !== (allow > 0)) failures++;
      checks++; if (int'(distance) != lag) failures++;
      if (!drain && allow == 0) n_hold++;
      s_fetched = 4'(($urandom % 4 == 0) ? $urandom % (allow + 1) : allow);
      if (drain && s_fetched > lag) s_fetched = 4'(lag);
      @(posedge clk);
      lag = lag + int'(m_fetched) - int'(s_fetched);
      if (lag >= SLACK) reached = 1;
      if (!drain && reached) begin checks++; if (lag < SLACK - FW) failures++; end
      @(negedge clk);
    end
    checks++; if (lag != 0 || n_hold == 0 || !reached) failures++;
    $display("held cycles %0d final lag %0d", n_hold, lag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
