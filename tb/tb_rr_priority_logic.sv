// tb_rr_priority_logic: exhaustive check of the fixed-priority selector.
//
// The 4-input block is checked against every row of its truth table
// (all enable and request combinations): with en low nothing is selected,
// otherwise exactly the lowest-index request. A 2-input and an 8-input
// instance are checked exhaustively the same way. Purely combinational,
// so each vector is checked 1 ns after it is applied.
module tb_rr_priority_logic;

  int checks = 0;
  int failures = 0;

  logic       en4, en2, en8;
  logic [3:0] in4, out4;
  logic [1:0] in2, out2;
  logic [7:0] in8, out8;

  rr_priority_logic #(.N(4)) dut4 (.en(en4), .in_req(in4), .out_gnt(out4));
  rr_priority_logic #(.N(2)) dut2 (.en(en2), .in_req(in2), .out_gnt(out2));
  rr_priority_logic #(.N(8)) dut8 (.en(en8), .in_req(in8), .out_gnt(out8));

  // Reference: the lowest set bit of v, gated by en.
  function automatic logic [7:0] lowest(logic en, logic [7:0] v);
    lowest = '0;
    if (en)
      for (int i = 7; i >= 0; i--) if (v[i]) lowest = 8'(1) << i;
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // The printed truth table rows for the 4-input block.
    en4 = 0; in4 = 4'b1111; #1 check("table row EN=0", 8'(out4), 8'h0);
    en4 = 1; in4 = 4'b0000; #1 check("table row none", 8'(out4), 8'h0);
    en4 = 1; in4 = 4'b1111; #1 check("table row in0",  8'(out4), 8'b0001);
    en4 = 1; in4 = 4'b1110; #1 check("table row in1",  8'(out4), 8'b0010);
    en4 = 1; in4 = 4'b1100; #1 check("table row in2",  8'(out4), 8'b0100);
    en4 = 1; in4 = 4'b1000; #1 check("table row in3",  8'(out4), 8'b1000);
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 16; v++) begin
        en4 = e[0]; in4 = v[3:0];
        #1 check($sformatf("N=4 en=%0d in=%b", e, in4), 8'(out4), lowest(en4, 8'(in4)));
      end
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 4; v++) begin
        en2 = e[0]; in2 = v[1:0];
        #1 check($sformatf("N=2 en=%0d in=%b", e, in2), 8'(out2), lowest(en2, 8'(in2)));
      end
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 256; v++) begin
        en8 = e[0]; in8 = v[7:0];
        #1 check($sformatf("N=8 en=%0d in=%b", e, in8), out8, lowest(en8, in8));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
