// tb_rr_bus_arbiter: checks the MxM round-robin bus arbiter.
//
// Directed part (M = 4): after reset master 0 holds the token; an ack
// sampled at one clock edge moves the token one place at the next edge
// (one cycle through the ack flip-flop); the worked example (token on
// master 2, masters 0 and 1 requesting: master 0 wins, and after the ack
// the token sits on master 3) is reproduced. Random part: random requests
// and acks, for M = 4, 2 and 8, compared every cycle with the integer
// model RrModel. Grants are checked in the same cycle as the requests.
module tb_rr_bus_arbiter;
  import rr_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       clock = 0;
  logic       reset;
  logic       ack4, ack2, ack8;
  logic [3:0] req4, gnt4;
  logic [1:0] req2, gnt2;
  logic [7:0] req8, gnt8;

  rr_bus_arbiter #(.M(4)) dut4 (.clock(clock), .reset(reset), .ack(ack4), .req(req4), .grant(gnt4));
  rr_bus_arbiter #(.M(2)) dut2 (.clock(clock), .reset(reset), .ack(ack2), .req(req2), .grant(gnt2));
  rr_bus_arbiter #(.M(8)) dut8 (.clock(clock), .reset(reset), .ack(ack8), .req(req8), .grant(gnt8));

  RrModel m4, m2, m8;

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
    m4 = new(4); m2 = new(2); m8 = new(8);
    reset = 1; ack4 = 0; ack2 = 0; ack8 = 0; req4 = 0; req2 = 0; req8 = 0;
    repeat (2) @(posedge clock);
    @(negedge clock); reset = 0;

    // Token on master 0 after reset.
    req4 = 4'b1111;
    #1 check("after reset", 8'(gnt4), 8'b0001);
    // Ack sampled at edge 1, token moves at edge 2.
    ack4 = 1;
    @(negedge clock); ack4 = 0;
    #1 check("one edge after ack: token not moved yet", 8'(gnt4), 8'b0001);
    @(negedge clock);
    #1 check("two edges after ack: token moved by one", 8'(gnt4), 8'b0010);
    @(negedge clock);
    #1 check("no further ack: token holds", 8'(gnt4), 8'b0010);
    // Move the token to master 2 (one more ack).
    ack4 = 1; @(negedge clock); ack4 = 0; @(negedge clock);
    #1 check("token on master 2", 8'(gnt4), 8'b0100);
    // Worked example: masters 0 and 1 request, master 0 wins.
    req4 = 4'b0011;
    #1 check("example: master 0 granted", 8'(gnt4), 8'b0001);
    ack4 = 1; @(negedge clock); ack4 = 0; @(negedge clock);
    req4 = 4'b1111;
    #1 check("example: token rotated to 4'b1000", 8'(gnt4), 8'b1000);
    req4 = 4'b0000;
    #1 check("no request, no grant", 8'(gnt4), 8'b0000);

    // Random part against the models.
    @(negedge clock); reset = 1;
    @(posedge clock); m4.reset(); m2.reset(); m8.reset();
    @(negedge clock); reset = 0;
    for (int i = 0; i < 3000; i++) begin
      req4 = 4'($urandom); req2 = 2'($urandom); req8 = 8'($urandom);
      if (i % 7 == 0) req8 = '1;
      ack4 = 1'($urandom_range(0, 1));
      ack2 = 1'($urandom_range(0, 1));
      ack8 = 1'($urandom_range(0, 1));
      #1;
      check("random M=4", 8'(gnt4), 8'(m4.grant(vec_t'(req4))));
      check("random M=2", 8'(gnt2), 8'(m2.grant(vec_t'(req2))));
      check("random M=8", gnt8,     8'(m8.grant(vec_t'(req8))));
      @(posedge clock);
      m4.clock(ack4); m2.clock(ack2); m8.clock(ack8);
      @(negedge clock);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
