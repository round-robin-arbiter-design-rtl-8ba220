// rr_ba_core: combinational part of an MxM round-robin bus arbiter.
//
// There is one priority logic block per token position. Block k is enabled
// by token[k] and sees the requests rotated so that its input j is
// req[(k+j) mod M]; its output j therefore stands for requester (k+j) mod M.
// Only the enabled block can produce a grant, and grant[i] is the OR of the
// outputs of all blocks that stand for requester i. The result: the
// requester holding the token has the highest priority, then the ones
// above it in increasing index order, wrapping around. grant is one-hot, or
// zero when nothing is requested. Timing: purely combinational.
// This structure (priority logic array plus OR gates) is the published 4x4
// bus arbiter, generalised to M inputs.
module rr_ba_core #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] token,
  input  logic [M-1:0] req,
  output logic [M-1:0] grant
);

  logic [M-1:0] pl_in  [M];  // rotated requests of priority logic block k
  logic [M-1:0] pl_out [M];  // outputs of priority logic block k

  for (genvar k = 0; k < M; k++) begin : g_pl
    for (genvar j = 0; j < M; j++) begin : g_rot
      assign pl_in[k][j] = req[(k + j) % M];
    end
    rr_priority_logic #(.N(M)) u_pl (
      .en      (token[k]),
      .in_req  (pl_in[k]),
      .out_gnt (pl_out[k])
    );
  end

  always_comb begin
    grant = '0;
    for (int unsigned i = 0; i < M; i++)
      for (int unsigned k = 0; k < M; k++)
        grant[i] = grant[i] | pl_out[k][(i + M - k) % M];
  end

endmodule
