// rr_hier_sa: MxM hierarchical round-robin switch arbiter.
//
// One such arbiter serves one output port of a switch: req[m] says that the
// queue of input m for this output holds a packet, and grant[m] lets it
// through. At most one grant is set, and one is set whenever a request is.
//
// Structure (see rr_arb_pkg for the planning rule): requests enter a row of
// leaf ack-req blocks; each block ORs its inputs into one request for the
// next level, and so on up to a root block. The root picks a subtree and
// returns its ack; each ack-req block ANDs its own bus-arbiter grant with
// the ack it received, so acknowledgements flow back down and exactly one
// leaf input ends up granted. With the default M = 32: eight 4x4 ack-req
// blocks, two 4x4 ack-req blocks above them and a 2x2 root. The request
// path crosses the OR gates of the non-root levels, the root, then one AND
// gate per non-root level on the way down.
//
// Fairness: the root token turns every clock; an ack-req block's token
// turns one clock after each cycle in which that block was acknowledged.
// Timing: grant is combinational from req in the same cycle; only the
// tokens are state. Synchronous, active-high reset.
// M must be a power of two, at least 2. USE_4X4 = 1 prefers 4-input blocks,
// as the published generator does; USE_4X4 = 0 builds the tree from 2x2
// blocks only.
module rr_hier_sa
  import rr_arb_pkg::*;
#(
  parameter int unsigned M       = 32,
  parameter bit          USE_4X4 = 1'b1
) (
  input  logic         clock,
  input  logic         reset,
  input  logic [M-1:0] req,
  output logic [M-1:0] grant
);

  localparam int unsigned NL = num_levels(M, USE_4X4);

  // lreq[l]: requests entering level l (low level_width(l) bits used).
  // lack[l]: acks (grants) leaving level l toward the level below.
  logic [M-1:0] lreq [NL];
  logic [M-1:0] lack [NL];

  assign lreq[0]  = req;
  assign grant    = lack[0];

  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int unsigned F  = level_fanin(M, USE_4X4, l);
    localparam int unsigned W  = level_width(M, USE_4X4, l);
    localparam int unsigned NB = W / F;

    if (l == NL - 1) begin : g_root
      rr_root_sa #(.N(F)) u_root (
        .clock (clock),
        .reset (reset),
        .req   (lreq[l][F-1:0]),
        .ack   (lack[l][F-1:0])
      );
    end else begin : g_node
      for (genvar b = 0; b < NB; b++) begin : g_blk
        rr_ack_req_sa #(.N(F)) u_sa (
          .clock  (clock),
          .reset  (reset),
          .ack    (lack[l+1][b]),
          .req    (lreq[l][b*F +: F]),
          .grant  (lack[l][b*F +: F]),
          .req_up (lreq[l+1][b])
        );
      end
    end

    if (W < M) begin : g_unused
      assign lack[l][M-1:W] = '0;
      if (l > 0) begin : g_req
        assign lreq[l][M-1:W] = '0;
      end
    end
  end

  initial begin
    if (M < 2 || (M & (M - 1)) != 0)
      $fatal(1, "rr_hier_sa: M = %0d is not a power of two >= 2", M);
  end

  a_grant_onehot0: assert property (@(posedge clock) disable iff (reset) $onehot0(grant))
    else $error("switch arbiter granted more than one input: %b", grant);
  a_grant_requested: assert property (@(posedge clock) disable iff (reset) (grant & ~req) == '0)
    else $error("switch arbiter granted an input that did not request");
  a_grant_if_req: assert property (@(posedge clock) disable iff (reset) (|req) == (|grant))
    else $error("switch arbiter left a request without a grant");

endmodule
