// tb_rag_top: end-to-end test of rag_top at its default sizes.
//
// Default parameters: a 4x4 bus arbiter and a 32x32 switch (32 hierarchical
// 32x32 switch arbiters and a 32x32 crossbar of 8-bit words). Every cycle
// the test applies random VOQ occupancy (loads from light to full),
// random head words, random bus requests and acks, and compares in the
// same cycle:
//   - ba_grant with the bus arbiter model,
//   - every voq_grant[m][n] with one tree model per output port,
//   - out_data / out_valid with the word of the granted VOQ.
// It also counts how often each mechanism occurred and fails if one never
// did: bus token rotation after ack, bus grant wrapping below the token,
// a request held back at a switch node for lack of ack from above, root
// contention, a crossbar transfer, an idle output, and one input granted
// by several outputs in the same cycle.
module tb_rag_top;
  import rr_ref_pkg::*;

  localparam int P  = 32;
  localparam int BA = 4;
  localparam int CYCLES = 3000;

  int checks = 0;
  int failures = 0;

  logic           clock = 0;
  logic           reset = 1;
  logic [BA-1:0]  ba_req, ba_grant;
  logic           ba_ack;
  logic [P-1:0]   voq_req   [P];
  logic [7:0]     voq_data  [P][P];
  logic [P-1:0]   voq_grant [P];
  logic [7:0]     out_data  [P];
  logic [P-1:0]   out_valid;

  rag_top dut (
    .clock     (clock),
    .reset     (reset),
    .ba_req    (ba_req),
    .ba_ack    (ba_ack),
    .ba_grant  (ba_grant),
    .voq_req   (voq_req),
    .voq_data  (voq_data),
    .voq_grant (voq_grant),
    .out_data  (out_data),
    .out_valid (out_valid)
  );

  always #5 clock = ~clock;

  RrModel   ba_model = new(BA);
  TreeModel sa_model [P];

  // mechanism counters
  int n_ba_rotate = 0, n_ba_wrap = 0, n_xfer = 0, n_idle = 0, n_multi = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (CYCLES + 100) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int load, prev_tok, sum_cont, sum_block;
    for (int n = 0; n < P; n++) sa_model[n] = new(P, 1'b1);
    ba_req = '0; ba_ack = 0;
    for (int m = 0; m < P; m++) begin
      voq_req[m] = '0;
      for (int n = 0; n < P; n++) voq_data[m][n] = '0;
    end
    repeat (2) @(posedge clock);
    @(negedge clock);
    reset = 0;
    for (int c = 0; c < CYCLES; c++) begin
      vec_t exp_ba;
      int gcount [P];
      // stimulus
      load = (c / 500) % 4;  // 0: 5 %, 1: 30 %, 2: 70 %, 3: 100 %
      for (int m = 0; m < P; m++)
        for (int n = 0; n < P; n++) begin
          voq_req[m][n]  = (load == 3) ? 1'b1 : ($urandom_range(0, 99) < (load == 0 ? 5 : load == 1 ? 30 : 70));
          voq_data[m][n] = 8'($urandom);
        end
      ba_req = BA'($urandom);
      ba_ack = 1'($urandom_range(0, 1));
      #1;
      // bus arbiter
      exp_ba = ba_model.grant(vec_t'(ba_req));
      check("bus arbiter grant", 32'(ba_grant), 32'(exp_ba[BA-1:0]));
      for (int i = 0; i < BA; i++)
        if (exp_ba[i] && i < ba_model.tok) n_ba_wrap++;
      // switch arbiters
      for (int m = 0; m < P; m++) gcount[m] = 0;
      for (int n = 0; n < P; n++) begin
        vec_t r, g;
        int   w;
        r = '0;
        for (int m = 0; m < P; m++) r[m] = voq_req[m][n];
        g = sa_model[n].grant(r);

        w = -1;
        for (int m = 0; m < P; m++) begin
          check($sformatf("voq_grant[%0d][%0d]", m, n), 32'(voq_grant[m][n]), 32'(g[m]));
          if (g[m]) begin
            w = m;
            gcount[m]++;
          end
        end
        check($sformatf("out_valid[%0d]", n), 32'(out_valid[n]), 32'(w >= 0));
        check($sformatf("out_data[%0d]", n), 32'(out_data[n]), (w >= 0) ? 32'(voq_data[w][n]) : 32'h0);
        if (w >= 0) n_xfer++;
        else        n_idle++;
      end
      for (int m = 0; m < P; m++) if (gcount[m] > 1) n_multi++;
      @(posedge clock);
      prev_tok = ba_model.tok;
      ba_model.clock(ba_ack);
      if (ba_model.tok != prev_tok) n_ba_rotate++;
      for (int n = 0; n < P; n++) sa_model[n].clock();
      @(negedge clock);
    end
    sum_cont = 0; sum_block = 0;
    for (int n = 0; n < P; n++) begin
      sum_cont  += sa_model[n].root_contention;
      sum_block += sa_model[n].ack_blocked;
    end
    $display("mechanisms: bus token rotations %0d, bus wrap-around grants %0d, root contention %0d,",
             n_ba_rotate, n_ba_wrap, sum_cont);
    $display("            requests held for lack of ack %0d, crossbar transfers %0d, idle outputs %0d,",
             sum_block, n_xfer, n_idle);
    $display("            inputs granted by several outputs at once %0d", n_multi);
    checks++; if (n_ba_rotate == 0) begin failures++; $display("FAIL bus token never rotated"); end
    checks++; if (n_ba_wrap   == 0) begin failures++; $display("FAIL bus grant never wrapped"); end
    checks++; if (sum_cont    == 0) begin failures++; $display("FAIL no root contention"); end
    checks++; if (sum_block   == 0) begin failures++; $display("FAIL no request held by ack"); end
    checks++; if (n_xfer      == 0) begin failures++; $display("FAIL no crossbar transfer"); end
    checks++; if (n_idle      == 0) begin failures++; $display("FAIL no idle output"); end
    checks++; if (n_multi     == 0) begin failures++; $display("FAIL no input granted twice"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
