// rr_ack_req_sa: NxN ack-req switch-arbiter block (N = 2 or 4), a non-root
// node of a hierarchical switch arbiter.
//
// The N requests are ORed into req_up, the node's single request to the
// level above. The level above answers with ack. Inside, an NxN bus arbiter
// picks one of the N requests round-robin, and each of its grants is ANDed
// with ack, so a grant leaves the node only when the node itself has been
// granted from above. The same ack drives the bus arbiter's ack flip-flop:
// the node's token rotates one clock after a cycle in which it was
// acknowledged. Timing: req -> req_up and ack -> grant are combinational;
// the token changes at clock edges.
module rr_ack_req_sa #(
  parameter int unsigned N = 4
) (
  input  logic         clock,
  input  logic         reset,
  input  logic         ack,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic         req_up
);

  logic [N-1:0] ba_grant;

  rr_bus_arbiter #(.M(N)) u_ba (
    .clock (clock),
    .reset (reset),
    .ack   (ack),
    .req   (req),
    .grant (ba_grant)
  );

  assign grant  = ba_grant & {N{ack}};
  assign req_up = |req;

endmodule
