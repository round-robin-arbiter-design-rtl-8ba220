// rr_bus_arbiter: MxM round-robin bus arbiter.
//
// Masters raise req; the arbiter answers with a one-hot grant in the same
// cycle (combinational from req and the current token). The requester that
// holds the token has the highest priority, then the masters above it in
// index order, wrapping around (see rr_ba_core). The ack input (for a bus:
// the end of a transfer; inside a switch arbiter: the grant from the level
// above) is captured in a D flip-flop, and the ring counter rotates the
// token by one position at every clock edge at which that flip-flop holds a
// one. So an ack seen at edge t moves the token at edge t+1.
// The token rotates by exactly one place, not to the winner's neighbour:
// with token 4'b0100 and requests from masters 0 and 1, master 0 wins and
// the token then moves to 4'b1000, as in the published worked example.
// Synchronous, active-high reset: token on master 0, ack flip-flop cleared.
module rr_bus_arbiter #(
  parameter int unsigned M = 4
) (
  input  logic         clock,
  input  logic         reset,
  input  logic         ack,
  input  logic [M-1:0] req,
  output logic [M-1:0] grant
);

  logic         ack_q;
  logic [M-1:0] token;

  always_ff @(posedge clock) begin
    if (reset) ack_q <= 1'b0;
    else       ack_q <= ack;
  end

  rr_ring_counter #(.N(M)) u_ring (
    .clock   (clock),
    .reset   (reset),
    .advance (ack_q),
    .token   (token)
  );

  rr_ba_core #(.M(M)) u_core (
    .token (token),
    .req   (req),
    .grant (grant)
  );

  a_grant_onehot0: assert property (@(posedge clock) disable iff (reset) $onehot0(grant))
    else $error("bus arbiter granted more than one master: %b", grant);
  a_grant_requested: assert property (@(posedge clock) disable iff (reset) (grant & ~req) == '0)
    else $error("bus arbiter granted a master that did not request");
  a_grant_if_req: assert property (@(posedge clock) disable iff (reset) (|req) == (|grant))
    else $error("bus arbiter left a request without a grant");

endmodule
