// rag_top: the two arbiter kinds side by side.
//
// 1. A BA_M x BA_M round-robin bus arbiter (default 4x4) for masters
//    sharing a bus: ba_req in, one-hot ba_grant out in the same cycle, and
//    ba_ack (end of the granted transfer) to move the token on.
// 2. The arbitration and crossbar of a PORTS x PORTS input-queued switch
//    (default 32x32). The queues themselves are outside: voq_req[m][n] says
//    that VOQ(m,n) (input m, destined to output n) holds a packet and
//    voq_data[m][n] is its head word. Output n has its own PORTS x PORTS
//    hierarchical switch arbiter, which picks one input among those with a
//    packet for n; voq_grant[m][n] tells VOQ(m,n) it was picked, and the
//    crossbar carries its word to out_data[n] in the same cycle.
//    The output arbiters are independent, as in the published design: one input may
//    be granted by several outputs in one cycle, one per VOQ.
// All paths from requests to grants and data are combinational; the tokens
// of the arbiters are the only state. Synchronous, active-high reset.
module rag_top #(
  parameter int unsigned BA_M    = 4,
  parameter int unsigned PORTS   = 32,
  parameter int unsigned DATA_W  = 8,
  parameter bit          USE_4X4 = 1'b1
) (
  input  logic                clock,
  input  logic                reset,
  // bus arbiter
  input  logic [BA_M-1:0]     ba_req,
  input  logic                ba_ack,
  output logic [BA_M-1:0]     ba_grant,
  // switch
  input  logic [PORTS-1:0]    voq_req   [PORTS],         // [m][n]
  input  logic [DATA_W-1:0]   voq_data  [PORTS][PORTS],  // [m][n]
  output logic [PORTS-1:0]    voq_grant [PORTS],         // [m][n]
  output logic [DATA_W-1:0]   out_data  [PORTS],
  output logic [PORTS-1:0]    out_valid
);

  rr_bus_arbiter #(.M(BA_M)) u_bus_arbiter (
    .clock (clock),
    .reset (reset),
    .ack   (ba_ack),
    .req   (ba_req),
    .grant (ba_grant)
  );

  logic [PORTS-1:0] sa_req   [PORTS];  // [n][m]
  logic [PORTS-1:0] sa_grant [PORTS];  // [n][m]

  for (genvar n = 0; n < PORTS; n++) begin : g_out
    for (genvar m = 0; m < PORTS; m++) begin : g_in
      assign sa_req[n][m]    = voq_req[m][n];
      assign voq_grant[m][n] = sa_grant[n][m];
    end
    rr_hier_sa #(.M(PORTS), .USE_4X4(USE_4X4)) u_sa (
      .clock (clock),
      .reset (reset),
      .req   (sa_req[n]),
      .grant (sa_grant[n])
    );
  end

  rr_crossbar #(.M(PORTS), .N(PORTS), .DATA_W(DATA_W)) u_xbar (
    .voq_data  (voq_data),
    .grant     (sa_grant),
    .out_data  (out_data),
    .out_valid (out_valid)
  );

endmodule
