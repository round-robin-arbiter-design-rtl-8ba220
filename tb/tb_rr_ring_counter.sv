// tb_rr_ring_counter: checks the token register of the arbiters.
//
// After reset the token must be on bit 0; with advance held high it must
// walk 0001 -> 0010 -> 0100 -> 1000 -> 0001, one step per clock; with
// advance low it must hold. A random advance pattern is then compared
// with an integer model of the token position, for N = 4 and N = 2.
module tb_rr_ring_counter;

  int checks = 0;
  int failures = 0;

  logic       clock = 0;
  logic       reset;
  logic       adv4, adv2;
  logic [3:0] tok4;
  logic [1:0] tok2;
  int         pos4, pos2;

  rr_ring_counter #(.N(4)) dut4 (.clock(clock), .reset(reset), .advance(adv4), .token(tok4));
  rr_ring_counter #(.N(2)) dut2 (.clock(clock), .reset(reset), .advance(adv2), .token(tok2));

  always #5 clock = ~clock;

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; adv4 = 1; adv2 = 1;
    @(posedge clock); @(negedge clock);
    check("reset value N=4", tok4, 4'b0001);
    check("reset value N=2", 4'(tok2), 4'b0001);
    reset = 0;
    // Rotation sequence of the worked example.
    for (int i = 1; i <= 8; i++) begin
      @(negedge clock);
      check($sformatf("rotation step %0d", i), tok4, 4'(1) << (i % 4));
      check($sformatf("rotation step %0d N=2", i), 4'(tok2), 4'(1) << (i % 2));
    end
    // Hold.
    adv4 = 0; adv2 = 0;
    @(negedge clock);
    check("hold before", tok4, 4'b0001);
    repeat (3) @(negedge clock);
    check("hold after 3 clocks", tok4, 4'b0001);
    // Random pattern against the integer model.
    pos4 = 0; pos2 = 0;
    for (int i = 0; i < 500; i++) begin
      adv4 = 1'($urandom_range(0, 1));
      adv2 = 1'($urandom_range(0, 1));
      @(posedge clock);
      if (adv4) pos4 = (pos4 + 1) % 4;
      if (adv2) pos2 = (pos2 + 1) % 2;
      @(negedge clock);
      check("random N=4", tok4, 4'(1) << pos4);
      check("random N=2", 4'(tok2), 4'(1) << pos2);
    end
    // Reset in the middle of operation.
    reset = 1; @(posedge clock); @(negedge clock);
    check("second reset", tok4, 4'b0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
