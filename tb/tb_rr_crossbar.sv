// tb_rr_crossbar: checks the crossbar fabric.
//
// For a 4x4 fabric with 8-bit words: random one-hot-or-zero grants per
// output and random VOQ head words; each output must carry the word of
// the granted VOQ(m,n), or zero with out_valid low when nothing is
// granted. The default 32x32 fabric gets a permutation test (output n
// takes input (n*5+3) mod 32) and an all-outputs-from-one-input test.
module tb_rr_crossbar;

  int checks = 0;
  int failures = 0;

  logic [7:0] d4 [4][4];
  logic [3:0] g4 [4];
  logic [7:0] o4 [4];
  logic [3:0] v4;

  logic [7:0]  d32 [32][32];
  logic [31:0] g32 [32];
  logic [7:0]  o32 [32];
  logic [31:0] v32;

  rr_crossbar #(.M(4), .N(4), .DATA_W(8)) dut4 (.voq_data(d4), .grant(g4), .out_data(o4), .out_valid(v4));
  rr_crossbar dut32 (.voq_data(d32), .grant(g32), .out_data(o32), .out_valid(v32));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel [4];
    for (int t = 0; t < 500; t++) begin
      for (int m = 0; m < 4; m++) for (int n = 0; n < 4; n++) d4[m][n] = 8'($urandom);
      for (int n = 0; n < 4; n++) begin
        sel[n] = $urandom_range(0, 4);  // 4 = nothing granted
        g4[n]  = (sel[n] == 4) ? 4'b0 : 4'(1) << sel[n];
      end
      #1;
      for (int n = 0; n < 4; n++) begin
        check($sformatf("4x4 out %0d data", n), 32'(o4[n]), (sel[n] == 4) ? 32'h0 : 32'(d4[sel[n]][n]));
        check($sformatf("4x4 out %0d valid", n), 32'(v4[n]), 32'(sel[n] != 4));
      end
    end
    for (int m = 0; m < 32; m++) for (int n = 0; n < 32; n++) d32[m][n] = 8'(m * 32 + n);
    for (int n = 0; n < 32; n++) g32[n] = 32'(1) << ((n * 5 + 3) % 32);
    #1;
    for (int n = 0; n < 32; n++) begin
      check("32x32 permutation data", 32'(o32[n]), {24'h0, 8'(((n * 5 + 3) % 32) * 32 + n)});
      check("32x32 permutation valid", 32'(v32[n]), 32'd1);
    end
    for (int n = 0; n < 32; n++) g32[n] = 32'(1) << 7;
    #1;
    for (int n = 0; n < 32; n++) check("32x32 one input to all outputs", 32'(o32[n]), {24'h0, 8'(7 * 32 + n)});
    for (int n = 0; n < 32; n++) g32[n] = '0;
    #1 check("32x32 idle", v32, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
