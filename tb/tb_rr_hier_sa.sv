// tb_rr_hier_sa: checks the MxM hierarchical switch arbiter.
//
// The default 32x32 arbiter (8 + 2 4x4 ack-req blocks under a 2x2 root)
// gets a directed test of the tree's behaviour under full load: the 2x2
// root alternates between the two halves every clock, so inputs 0, 16, 4,
// 20, 8, 24, ... are granted in turn. Then one checker per size compares
// random traffic cycle by cycle with the tree model: M = 2 .. 128 with
// 4x4 blocks preferred, and M = 4, 8, 32 built from 2x2 blocks only (the
// 4x4 arbiter from two 2x2 ack-req blocks and a 2x2 root). Grants are
// checked in the cycle the requests are applied.
module tb_rr_hier_sa;

  int checks = 0;
  int failures = 0;

  logic        clock = 0;
  logic        reset = 1;
  logic [31:0] req32, gnt32;

  always #5 clock = ~clock;

  rr_hier_sa dut32 (.clock(clock), .reset(reset), .req(req32), .grant(gnt32));

  localparam int NCK = 10;
  localparam int CK_M   [NCK] = '{2, 4, 8, 16, 32, 64, 128, 4, 8, 32};
  localparam bit CK_USE4[NCK] = '{1, 1, 1, 1,  1,  1,  1,   0, 0, 0};

  int   ck_checks [NCK];
  int   ck_fail   [NCK];
  int   ck_cont   [NCK];
  int   ck_block  [NCK];
  logic ck_done   [NCK];

  for (genvar i = 0; i < NCK; i++) begin : g_ck
    hier_sa_checker #(.M(CK_M[i]), .USE_4X4(CK_USE4[i]), .CYCLES(1000)) u_ck (
      .clock           (clock),
      .reset           (reset),
      .checks          (ck_checks[i]),
      .failures        (ck_fail[i]),
      .root_contention (ck_cont[i]),
      .ack_blocked     (ck_block[i]),
      .done            (ck_done[i])
    );
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_done();
    for (int i = 0; i < NCK; i++) if (!ck_done[i]) return 0;
    return 1;
  endfunction

  initial begin
    req32 = '0;
    repeat (3) @(posedge clock);
    @(negedge clock); reset = 0;
    // Full load on the 32x32 arbiter, worked out by hand: root token flips
    // every clock; a level-1 block's token moves one clock after each
    // acknowledged cycle, i.e. once per visit; the same for the leaves.
    // Cycle c: half h = c%2; level-1 pick p = (c/2)%4; leaf pick (c/8)%4.
    req32 = '1;
    for (int c = 0; c < 64; c++) begin
      int h, p, q;
      h = c % 2; p = (c / 2) % 4; q = (c / 8) % 4;
      #1 check($sformatf("32x32 full load cycle %0d", c), gnt32, 32'(1) << (16 * h + 4 * p + q));
      @(negedge clock);
    end
    // Only input 31 requests: granted at once, whatever the tokens.
    req32 = 32'h8000_0000;
    for (int c = 0; c < 5; c++) begin
      #1 check("single request", gnt32, 32'h8000_0000);
      @(negedge clock);
    end
    req32 = '0;
    #1 check("no request", gnt32, '0);
    while (!all_done()) @(negedge clock);
    for (int i = 0; i < NCK; i++) begin
      checks   += ck_checks[i];
      failures += ck_fail[i];
      $display("M=%0d use4=%0d: %0d checks, %0d failures, root contention %0d, blocked by ack %0d",
               CK_M[i], CK_USE4[i], ck_checks[i], ck_fail[i], ck_cont[i], ck_block[i]);
      if (CK_M[i] > 4 || (CK_M[i] > 2 && !CK_USE4[i])) begin
        checks++;
        if (ck_cont[i] == 0 || ck_block[i] == 0) begin
          failures++;
          $display("FAIL M=%0d: contention or ack blocking never exercised", CK_M[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
