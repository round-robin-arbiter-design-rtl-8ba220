// tb_rr_root_sa: checks the 2x2 and 4x4 root switch-arbiter blocks.
//
// The root has no ack from above, so its token must advance on every
// clock: with all requests high the 2x2 root must alternate its ack
// 01, 10, 01, ... and the 4x4 root must walk 0001, 0010, 0100, 1000.
// A random run compares both with a token that counts clock edges.
module tb_rr_root_sa;
  import rr_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       clock = 0;
  logic       reset;
  logic [3:0] req4, ack4;
  logic [1:0] req2, ack2;
  int         cyc;

  rr_root_sa #(.N(4)) dut4 (.clock(clock), .reset(reset), .req(req4), .ack(ack4));
  rr_root_sa #(.N(2)) dut2 (.clock(clock), .reset(reset), .req(req2), .ack(ack2));

  always #5 clock = ~clock;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  function automatic logic [7:0] expect_ack(int n, int t, logic [7:0] r);
    int w;
    w = rr_pick(vec_t'(r), 0, n, t);
    return (w < 0) ? 8'h0 : 8'(1) << w;
  endfunction

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; req4 = 0; req2 = 0;
    repeat (2) @(posedge clock);
    @(negedge clock); reset = 0;
    req4 = '1; req2 = '1;
    for (int i = 0; i < 8; i++) begin
      #1;
      check($sformatf("4x4 full load cycle %0d", i), 8'(ack4), 8'(1) << (i % 4));
      check($sformatf("2x2 full load cycle %0d", i), 8'(ack2), 8'(1) << (i % 2));
      @(negedge clock);
    end
    cyc = 8;
    for (int i = 0; i < 2000; i++) begin
      req4 = 4'($urandom); req2 = 2'($urandom);
      #1;
      check("random 4x4", 8'(ack4), expect_ack(4, cyc % 4, 8'(req4)));
      check("random 2x2", 8'(ack2), expect_ack(2, cyc % 2, 8'(req2)));
      @(negedge clock);
      cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
