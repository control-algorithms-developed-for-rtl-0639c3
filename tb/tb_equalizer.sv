// tb_equalizer: hand-worked swaps plus random cases against a model. A swap
// must happen exactly when start, imbal and allow are high, the level is not
// zero and an idle available unit outranks an active one in the ranking of
// the present role; it must then keep the level, exchange the worst active
// unit with the best idle one and write the entry of the present level one
// cycle after start.
module tb_equalizer;
  import erfa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, imbal, allow, cur_neg, we, swap;
  vector_t present, wdata;
  logic [N_UNITS-1:0] avail;
  order_t order_del, order_rec;
  logic [3:0] waddr;
  int checks = 0, failures = 0, nswap = 0;
  always #5 clk = ~clk;

  equalizer dut (.clk, .rst_n, .start, .imbal, .allow, .present, .avail, .cur_neg, .order_del,
                 .order_rec, .we, .waddr, .wdata, .swap);

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

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
  endtask

  initial begin
    start = 0; imbal = 1; allow = 1; cur_neg = 0; avail = 4'hF;
    present = '{3: U_ZERO, 2: U_ZERO, 1: U_POS, 0: U_POS};
    order_del = '{3: 2'd0, 2: 2'd1, 1: 2'd2, 0: 2'd3};   // best 3,2,1,0
    order_rec = '{3: 2'd3, 2: 2'd2, 1: 2'd1, 0: 2'd0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    pulse();
    check(we && swap && waddr == 4'd6, "hand swap written at level +2");
    check(wdata[3] == U_POS && wdata[1] == U_POS && wdata[0] == U_ZERO && wdata[2] == U_ZERO,
          "unit 0 out, unit 3 in");
    imbal = 0; pulse(); check(!we, "no swap without imbalance");
    imbal = 1; allow = 0; pulse(); check(!we, "no swap when not allowed");
    allow = 1; present = '{default: U_ZERO}; pulse(); check(!we, "no swap at 0 V");
    // negative current: positive units recover energy -> recovering ranking
    present = '{3: U_ZERO, 2: U_ZERO, 1: U_POS, 0: U_POS}; cur_neg = 1;
    pulse(); check(!we, "recovering ranking already best");
    for (int t = 0; t < 5000; t++) begin
      bit exp;
      int na, lvl, ain, aout, rin, rout;
      unit_state_t st;
      order_t ord;
      imbal = ($urandom_range(0, 4) != 0);
      allow = ($urandom_range(0, 4) != 0);
      avail = 4'($urandom);
      cur_neg = 1'($urandom);
      order_del = rand_order(); order_rec = rand_order();
      st = ($urandom_range(0, 1) != 0) ? U_POS : U_NEG;
      for (int i = 0; i < 4; i++) present[i] = (avail[i] && $urandom_range(0, 1) != 0) ? st : U_ZERO;
      lvl = int'(vector_level(present));
      ord = ((lvl >= 0) != cur_neg) ? order_del : order_rec;
      rin = 9; rout = -1; ain = 0; aout = 0;
      for (int r = 0; r < 4; r++) begin
        int u;
        u = int'(ord[r]);
        if (avail[u] && present[u] == U_ZERO && r < rin) begin rin = r; ain = u; end
        if (avail[u] && present[u] != U_ZERO && r > rout) begin rout = r; aout = u; end
      end
      exp = imbal && allow && lvl != 0 && rin < 9 && rout >= 0 && rin < rout;
      pulse();
      check(we == exp && swap == exp, $sformatf("swap decision t=%0d", t));
      if (exp) begin
        nswap++;
        check(waddr == 4'(lvl + 4), "address of present level");
        check(vector_level(wdata) == level_t'(lvl), "level kept");
        check(wdata[ain] == st && wdata[aout] == U_ZERO, "best idle in, worst active out");
        for (int i = 0; i < 4; i++)
          if (i != ain && i != aout) check(wdata[i] == present[i], "others unchanged");
      end
    end
    check(nswap > 100, "swaps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
