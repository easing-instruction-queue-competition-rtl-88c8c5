// slack_fetch: slack fetch control of one redundant thread pair.
//
// The slave thread is kept at least SLACK instructions behind its master, so
// that by the time a slave load or branch is fetched the master has usually
// committed it and the load value / branch outcome is already waiting in the
// queues. The controller counts instructions fetched by each copy and
// enables slave fetch only while the master is at least SLACK instructions
// ahead; drain (the master has finished its program) lifts the limit so the
// slave can catch up. s_fetch_max bounds how many instructions the slave may
// fetch this cycle so that the lag never drops below SLACK.
// SLACK = 128 follows the evaluated configuration; counting at fetch and the
// drain input are this design's choices. Counts update at the clock edge.
module slack_fetch
  import dddi_pkg::*;
#(
  parameter int unsigned SLACK   = 128,
  parameter int unsigned FETCH_W = MACHINE_W,
  parameter int unsigned DIST_W  = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(FETCH_W+1)-1:0]  m_fetched,
  input  logic [$clog2(FETCH_W+1)-1:0]  s_fetched,
  input  logic                          drain,
  output logic                          s_fetch_en,
  output logic [$clog2(FETCH_W+1)-1:0]  s_fetch_max,
  output logic [DIST_W-1:0]             distance
);

  localparam int unsigned FW = $clog2(FETCH_W+1);

  logic [DIST_W-1:0] room;

  always_comb begin
    if (drain)                              room = DIST_W'(FETCH_W);
    else if (32'(distance) >= SLACK)        room = distance - DIST_W'(SLACK);
    else                                    room = '0;
    s_fetch_max = (32'(room) >= FETCH_W) ? FW'(FETCH_W) : FW'(room);
    s_fetch_en  = (s_fetch_max != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) distance <= '0;
    else        distance <= distance + DIST_W'(m_fetched) - DIST_W'(s_fetched);
  end

endmodule
