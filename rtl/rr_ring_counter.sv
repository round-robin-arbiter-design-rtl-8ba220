// rr_ring_counter: one-hot token register of a round-robin arbiter.
//
// The token marks the requester with the highest priority. On every rising
// clock edge at which advance is high the token moves one position up,
// wrapping from the top bit to bit 0 (4'b0100 -> 4'b1000 -> 4'b0001). A
// synchronous, active-high reset puts the token on bit 0. The rotation
// direction follows the worked bus arbiter example; the reset value and the
// synchronous reset are this design's choice.
module rr_ring_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clock,
  input  logic         reset,
  input  logic         advance,
  output logic [N-1:0] token
);

  localparam logic [N-1:0] TOKEN_RESET = N'(1);

  always_ff @(posedge clock) begin
    if (reset)        token <= TOKEN_RESET;
    else if (advance) token <= (N > 1) ? {token[N-2:0], token[N-1]} : token;
  end

  // The token never leaves the one-hot code.
  a_token_onehot: assert property (@(posedge clock) disable iff (reset) $onehot(token))
    else $error("ring counter token is not one-hot: %b", token);

endmodule
