// tb_rr_ba_core: exhaustive check of the bus arbiter's combinational part.
//
// For every token position and every request pattern the grant must go to
// the first requester found searching upward from the token position,
// wrapping around. Checked exhaustively for M = 4 and M = 2, and for
// M = 8 on all 8 x 256 cases. Includes the worked example: token 4'b0100
// with masters 0 and 1 requesting grants master 0.
module tb_rr_ba_core;
  import rr_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0] tok4, req4, gnt4;
  logic [1:0] tok2, req2, gnt2;
  logic [7:0] tok8, req8, gnt8;

  rr_ba_core #(.M(4)) dut4 (.token(tok4), .req(req4), .grant(gnt4));
  rr_ba_core #(.M(2)) dut2 (.token(tok2), .req(req2), .grant(gnt2));
  rr_ba_core #(.M(8)) dut8 (.token(tok8), .req(req8), .grant(gnt8));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  function automatic logic [7:0] expect_grant(int n, int t, logic [7:0] r);
    int w;
    w = rr_pick(vec_t'(r), 0, n, t);
    return (w < 0) ? 8'h0 : 8'(1) << w;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tok4 = 4'b0100; req4 = 4'b0011;
    #1 check("worked example", 8'(gnt4), 8'b0001);
    for (int t = 0; t < 4; t++)
      for (int r = 0; r < 16; r++) begin
        tok4 = 4'(1) << t; req4 = r[3:0];
        #1 check($sformatf("M=4 tok=%0d req=%b", t, req4), 8'(gnt4), expect_grant(4, t, 8'(req4)));
      end
    for (int t = 0; t < 2; t++)
      for (int r = 0; r < 4; r++) begin
        tok2 = 2'(1) << t; req2 = r[1:0];
        #1 check($sformatf("M=2 tok=%0d req=%b", t, req2), 8'(gnt2), expect_grant(2, t, 8'(req2)));
      end
    for (int t = 0; t < 8; t++)
      for (int r = 0; r < 256; r++) begin
        tok8 = 8'(1) << t; req8 = r[7:0];
        #1 check($sformatf("M=8 tok=%0d req=%b", t, req8), gnt8, expect_grant(8, t, req8));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
