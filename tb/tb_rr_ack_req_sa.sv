// tb_rr_ack_req_sa: checks the 2x2 and 4x4 ack-req switch-arbiter blocks.
//
// req_up must be the OR of the requests; grants must be the round-robin
// choice of the internal bus arbiter, but only while ack from above is
// high; the token must move one clock after each acknowledged cycle.
// Directed cases show a request blocked by a low ack; a random run
// compares both block sizes every cycle with RrModel plus the AND/OR
// rule, grants checked in the same cycle.
module tb_rr_ack_req_sa;
  import rr_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       clock = 0;
  logic       reset;
  logic       ack4, ack2, up4, up2;
  logic [3:0] req4, gnt4;
  logic [1:0] req2, gnt2;

  rr_ack_req_sa #(.N(4)) dut4 (.clock(clock), .reset(reset), .ack(ack4), .req(req4), .grant(gnt4), .req_up(up4));
  rr_ack_req_sa #(.N(2)) dut2 (.clock(clock), .reset(reset), .ack(ack2), .req(req2), .grant(gnt2), .req_up(up2));

  RrModel m4, m2;

  always #5 clock = ~clock;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m4 = new(4); m2 = new(2);
    reset = 1; ack4 = 0; ack2 = 0; req4 = 0; req2 = 0;
    repeat (2) @(posedge clock);
    @(negedge clock); reset = 0;

    // Requests without ack: req_up set, no grant, token does not move.
    req4 = 4'b0110; ack4 = 0;
    #1 check("req_up is OR of requests", 8'(up4), 8'd1);
    check("no ack, no grant", 8'(gnt4), 8'b0000);
    repeat (3) @(negedge clock);
    ack4 = 1;
    #1 check("ack: token still on 0, master 1 wins", 8'(gnt4), 8'b0010);
    @(negedge clock);
    #1 check("one edge later: token not yet moved", 8'(gnt4), 8'b0010);
    ack4 = 0;
    @(negedge clock);
    ack4 = 1;
    #1 check("token moved to 1", 8'(gnt4), 8'b0010);
    req4 = 4'b0001;
    #1 check("wrap-around: master 0 granted", 8'(gnt4), 8'b0001);
    req4 = 4'b0000;
    #1 check("req_up low without requests", 8'(up4), 8'd0);

    @(negedge clock); reset = 1;
    @(posedge clock); m4.reset(); m2.reset();
    @(negedge clock); reset = 0;
    for (int i = 0; i < 3000; i++) begin
      req4 = 4'($urandom); req2 = 2'($urandom);
      ack4 = 1'($urandom_range(0, 1));
      ack2 = 1'($urandom_range(0, 1));
      #1;
      check("random N=4 grant", 8'(gnt4), ack4 ? 8'(m4.grant(vec_t'(req4))) : 8'h0);
      check("random N=2 grant", 8'(gnt2), ack2 ? 8'(m2.grant(vec_t'(req2))) : 8'h0);
      check("random N=4 req_up", 8'(up4), 8'(req4 != 0));
      check("random N=2 req_up", 8'(up2), 8'(req2 != 0));
      @(posedge clock);
      m4.clock(ack4); m2.clock(ack2);
      @(negedge clock);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
