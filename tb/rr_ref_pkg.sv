// rr_ref_pkg: reference models for the arbiter testbenches.
//
// The models are written from the arbitration rules, not from the RTL
// structure: a round-robin pick is a search starting at the token index,
// and the switch-arbiter tree is evaluated level by level with plain
// integer token indices. Widths up to MAXW request lines are supported.
//
//  - RrModel:   one bus arbiter (token index, ack flip-flop).
//  - TreeModel: one hierarchical switch arbiter (4-input levels preferred,
//               a 2-input root when log2(M) is odd, or 2-input levels only).
package rr_ref_pkg;

  localparam int MAXW = 128;
  typedef logic [MAXW-1:0] vec_t;

  // Index of the first requester found searching tok, tok+1, ... mod n,
  // or -1 when none of req[base +: n] is set.
  function automatic int rr_pick(vec_t req, int base, int n, int tok);
    for (int i = 0; i < n; i++) begin
      int k;
      k = (tok + i) % n;
      if (req[base + k]) return k;
    end
    return -1;
  endfunction

  class RrModel;
    int n;
    int tok;
    bit ack_q;
    function new(int n_in);
      this.n = n_in;
      reset();
    endfunction
    function void reset();
      tok   = 0;
      ack_q = 0;
    endfunction
    function vec_t grant(vec_t req);
      int w;
      grant = '0;
      w = rr_pick(req, 0, n, tok);
      if (w >= 0) grant[w] = 1'b1;
    endfunction
    // One rising clock edge with the given ack value before it.
    function void clock(bit ack);
      if (ack_q) tok = (tok + 1) % n;
      ack_q = ack;
    endfunction
  endclass

  class TreeModel;
    int m;
    int nl;
    int fan[$];
    int width[$];
    int tok[][];     // [level][block]
    bit ack_q[][];   // [level][block], non-root levels
    bit ack_in[][];  // ack seen by each block in the last evaluation
    vec_t lreq[];    // requests entering each level
    vec_t lack[];    // acks leaving each level
    // event counters for coverage
    int root_contention;  // root saw more than one subtree requesting
    int ack_blocked;      // a block had requests but no ack from above

    function new(int m_in, bit use4);
      int l2, w;
      this.m = m_in;
      l2 = 0;
      while ((1 << l2) < m) l2++;
      fan = {};
      if (use4) begin
        for (int i = 0; i < l2 / 2; i++) fan.push_back(4);
        if (l2 % 2 == 1) fan.push_back(2);
      end else begin
        for (int i = 0; i < l2; i++) fan.push_back(2);
      end
      nl = fan.size();
      width = {};
      w = m;
      for (int l = 0; l < nl; l++) begin
        width.push_back(w);
        w = w / fan[l];
      end
      tok    = new[nl];
      ack_q  = new[nl];
      ack_in = new[nl];
      lreq   = new[nl + 1];
      lack   = new[nl];
      for (int l = 0; l < nl; l++) begin
        tok[l]    = new[width[l] / fan[l]];
        ack_q[l]  = new[width[l] / fan[l]];
        ack_in[l] = new[width[l] / fan[l]];
      end
      root_contention = 0;
      ack_blocked     = 0;
      reset();
    endfunction

    function void reset();
      for (int l = 0; l < nl; l++)
        for (int b = 0; b < width[l] / fan[l]; b++) begin
          tok[l][b]   = 0;
          ack_q[l][b] = 0;
        end
    endfunction

    function vec_t grant(vec_t req);
      lreq[0] = '0;
      for (int i = 0; i < m; i++) lreq[0][i] = req[i];
      for (int l = 0; l < nl; l++) begin
        lreq[l+1] = '0;
        for (int b = 0; b < width[l] / fan[l]; b++)
          for (int j = 0; j < fan[l]; j++)
            if (lreq[l][b*fan[l] + j]) lreq[l+1][b] = 1'b1;
      end
      for (int l = nl - 1; l >= 0; l--) begin
        lack[l] = '0;
        for (int b = 0; b < width[l] / fan[l]; b++) begin
          bit a;
          int w;
          a = (l == nl - 1) ? 1'b1 : lack[l+1][b];
          ack_in[l][b] = a;
          w = rr_pick(lreq[l], b * fan[l], fan[l], tok[l][b]);
          if (a && w >= 0) lack[l][b*fan[l] + w] = 1'b1;
          if (!a && lreq[l+1][b]) ack_blocked++;
        end
      end
      if (nl > 0) begin
        int cnt;
        cnt = 0;
        for (int j = 0; j < fan[nl-1]; j++) cnt += lreq[nl-1][j];
        if (cnt > 1) root_contention++;
      end
      return lack[0];
    endfunction

    // One rising clock edge; uses the acks of the last grant() call.
    function void clock();
      for (int l = 0; l < nl; l++)
        for (int b = 0; b < width[l] / fan[l]; b++) begin
          if (l == nl - 1) tok[l][b] = (tok[l][b] + 1) % fan[l];
          else begin
            if (ack_q[l][b]) tok[l][b] = (tok[l][b] + 1) % fan[l];
            ack_q[l][b] = ack_in[l][b];
          end
        end
    endfunction
  endclass

endpackage
