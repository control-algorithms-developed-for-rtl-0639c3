// tb_vector_gen: random present vectors, targets, availability, current sign
// and rankings. For every case the vector must give the target level
// (limited to the available units), never mix polarities, leave unavailable
// units at 0 V, switch exactly |target - present| units when the polarity is
// kept, and take (or release) units in ranking order of the role that the
// level and current signs select. Two hand-worked cases are checked exactly.
module tb_vector_gen;
  import erfa_pkg::*;
  level_t target;
  vector_t present, vec;
  logic [N_UNITS-1:0] avail;
  logic cur_neg;
  order_t order_del, order_rec;
  int checks = 0, failures = 0;

  vector_gen dut (.target, .present, .avail, .cur_neg, .order_del, .order_rec, .vec);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic order_t rand_order();
    order_t o;
    int p[4];
    p = '{0, 1, 2, 3};
    for (int i = 3; i > 0; i--) begin
      int j, t;
      j = $urandom_range(0, i);
      t = p[i]; p[i] = p[j]; p[j] = t;
    end
    for (int i = 0; i < 4; i++) o[i] = unit_idx_t'(p[i]);
    return o;
  endfunction

  function automatic int rank_of(order_t o, int u);
    for (int r = 0; r < 4; r++) if (int'(o[r]) == u) return r;
    return -1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Hand case: all available, units idle, positive current, delivering
    // ranking 2,0,3,1: +2 uses units 2 and 0; -1 (recovering ranking 1,3,0,2)
    // uses unit 1.
    avail = 4'hF; cur_neg = 0; present = '{default: U_ZERO};
    order_del = '{3: 2'd1, 2: 2'd3, 1: 2'd0, 0: 2'd2};
    order_rec = '{3: 2'd2, 2: 2'd0, 1: 2'd3, 0: 2'd1};
    target = 4'sd2;
    #1 check(vec[2] == U_POS && vec[0] == U_POS && vec[1] == U_ZERO && vec[3] == U_ZERO, "hand +2");
    target = -4'sd1;
    #1 check(vec[1] == U_NEG && vec[0] == U_ZERO && vec[2] == U_ZERO && vec[3] == U_ZERO, "hand -1");
    // From units 2,0 at +3 kV, going to +1 keeps the better-ranked unit 2
    present = '{3: U_ZERO, 2: U_POS, 1: U_ZERO, 0: U_POS};
    target = 4'sd1;
    #1 check(vec[2] == U_POS && vec[0] == U_ZERO, "hand +2 -> +1");
    for (int t = 0; t < 20000; t++) begin
      int na, k, n, changed, lvl;
      bit pos, same, ok;
      unit_state_t st;
      order_t ord;
      avail = 4'($urandom);
      cur_neg = 1'($urandom);
      order_del = rand_order();
      order_rec = rand_order();
      na = 0;
      for (int i = 0; i < 4; i++) na += avail[i];
      target = level_t'($urandom_range(0, 8) - 4);
      st = ($urandom_range(0, 1) != 0) ? U_POS : U_NEG;
      for (int i = 0; i < 4; i++) present[i] = (avail[i] && $urandom_range(0, 1) != 0) ? st : U_ZERO;
      #1;
      lvl = int'(target);
      if (lvl > na) lvl = na;
      if (lvl < -na) lvl = -na;
      check(int'(vector_level(vec)) == lvl, $sformatf("level t=%0d", t));
      ok = 1;
      for (int i = 0; i < 4; i++) begin
        if (!avail[i] && vec[i] != U_ZERO) ok = 0;
        if (lvl > 0 && vec[i] == U_NEG) ok = 0;
        if (lvl < 0 && vec[i] == U_POS) ok = 0;
        if (lvl == 0 && vec[i] != U_ZERO) ok = 0;
      end
      check(ok, $sformatf("polarity/availability t=%0d", t));
      if (lvl != 0) begin
        pos = (lvl > 0);
        k = pos ? lvl : -lvl;
        n = 0;
        for (int i = 0; i < 4; i++) if (present[i] == (pos ? U_POS : U_NEG)) n++;
        same = (n > 0);
        ord = (pos != cur_neg) ? order_del : order_rec;
        changed = 0;
        for (int i = 0; i < 4; i++) if (vec[i] != present[i]) changed++;
        if (same) begin
          check(changed == (k > n ? k - n : n - k), $sformatf("minimal switching t=%0d", t));
          // added units outrank every idle unit left out; removed units are
          // outranked by every active unit kept
          ok = 1;
          for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) if (avail[a] && avail[b]) begin
            if (k > n && present[a] == U_ZERO && vec[a] != U_ZERO && present[b] == U_ZERO && vec[b] == U_ZERO &&
                rank_of(ord, a) > rank_of(ord, b)) ok = 0;
            if (k < n && present[a] != U_ZERO && vec[a] == U_ZERO && present[b] != U_ZERO && vec[b] != U_ZERO &&
                rank_of(ord, a) < rank_of(ord, b)) ok = 0;
          end
          check(ok, $sformatf("ranking order t=%0d", t));
        end else begin
          ok = 1;
          for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
            if (avail[a] && avail[b] && vec[a] != U_ZERO && vec[b] == U_ZERO && rank_of(ord, a) > rank_of(ord, b)) ok = 0;
          check(ok, $sformatf("fresh choice by ranking t=%0d", t));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
