// hier_sa_checker: drives one rr_hier_sa of size M with random requests
// and compares its grants every cycle with TreeModel (see rr_ref_pkg).
//
// Phases: sparse random requests, dense random requests, then a full-load
// phase with every input requesting, in which every input must be granted
// at least once within 8*M cycles (round-robin fairness). Counts checks
// and failures and raises done when finished. Used by tb_rr_hier_sa.
module hier_sa_checker #(
  parameter int unsigned M       = 8,
  parameter bit          USE_4X4 = 1'b1,
  parameter int          CYCLES  = 1000
) (
  input  logic clock,
  input  logic reset,
  output int   checks,
  output int   failures,
  output int   root_contention,
  output int   ack_blocked,
  output logic done
);
  import rr_ref_pkg::*;

  logic [M-1:0] req, grant;
  bit   [M-1:0] seen;
  TreeModel     model = new(M, USE_4X4);

  rr_hier_sa #(.M(M), .USE_4X4(USE_4X4)) dut (
    .clock (clock),
    .reset (reset),
    .req   (req),
    .grant (grant)
  );

  function automatic logic [M-1:0] rand_req(int density);
    for (int i = 0; i < M; i++) rand_req[i] = ($urandom_range(0, 99) < density);
  endfunction

  bit checking = 0;

  // The model follows the arbiter's clock and reset, and its grant is
  // compared 1 ns after each falling edge, when the new requests settle.
  always @(posedge clock) begin
    if (reset) model.reset();
    else       model.clock();
  end

  always @(negedge clock) begin
    vec_t exp;
    #1;
    exp = model.grant(vec_t'(req));
    if (checking) begin
      checks++;
      if (grant !== exp[M-1:0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL M=%0d use4=%0d req=%h grant=%h expected=%h", M, USE_4X4, req, grant, exp[M-1:0]);
      end
      seen |= grant;
    end
  end

  task automatic step(logic [M-1:0] r);
    req = r;
    @(negedge clock);
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; req = '0;
    root_contention = 0; ack_blocked = 0;
    @(negedge clock);
    while (reset) @(negedge clock);
    checking = 1;
    for (int i = 0; i < CYCLES; i++) step(rand_req(10));
    for (int i = 0; i < CYCLES; i++) step(rand_req(60));
    seen = '0;
    for (int i = 0; i < 8 * M; i++) step('1);
    checking = 0;
    checks++;
    if (seen != '1) begin
      failures++;
      $display("FAIL M=%0d use4=%0d: inputs never granted under full load: %h", M, USE_4X4, ~seen);
    end
    root_contention = model.root_contention;
    ack_blocked     = model.ack_blocked;
    done = 1;
  end

endmodule
