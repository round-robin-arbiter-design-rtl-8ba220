// rr_root_sa: NxN root switch-arbiter block (N = 2 or 4), the top node of a
// hierarchical switch arbiter.
//
// It is the bus arbiter logic without the ack flip-flop: there is no level
// above to acknowledge it, so its ring counter rotates the token by one
// position at every rising clock edge and the root's priority moves on
// every cycle. ack (the grant to each subtree) is combinational from req
// and the current token and is one-hot, or zero without requests.
// That the ring counter advances on every clock is this design's reading of
// a ring counter that has only clock and reset inputs.
module rr_root_sa #(
  parameter int unsigned N = 2
) (
  input  logic         clock,
  input  logic         reset,
  input  logic [N-1:0] req,
  output logic [N-1:0] ack
);

  logic [N-1:0] token;

  rr_ring_counter #(.N(N)) u_ring (
    .clock   (clock),
    .reset   (reset),
    .advance (1'b1),
    .token   (token)
  );

  rr_ba_core #(.M(N)) u_core (
    .token (token),
    .req   (req),
    .grant (ack)
  );

endmodule
