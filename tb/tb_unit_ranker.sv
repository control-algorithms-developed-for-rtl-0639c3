// tb_unit_ranker: random deviations, penalties and availability; for both
// roles the order must be a permutation, list available units first and be
// sorted by the role's priority (deliver: dev - pen, recover: -dev - pen),
// ties by lower unit index. A few hand-worked cases are checked exactly.
module tb_unit_ranker;
  import erfa_pkg::*;
  logic deliver;
  logic [N_UNITS-1:0] avail;
  logic signed [N_UNITS-1:0][19:0] dev;
  logic [N_UNITS-1:0][19:0] pen;
  order_t order;
  int checks = 0, failures = 0;

  unit_ranker dut (.deliver, .avail, .dev, .pen, .order);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint prio(int i);
    if (deliver) return longint'(signed'(dev[i])) - longint'(pen[i]);
    else         return -longint'(signed'(dev[i])) - longint'(pen[i]);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: deliver, energies 5,-3,9,0, no penalty -> 2,0,3,1
    deliver = 1; avail = 4'hF;
    dev[0] = 5; dev[1] = -3; dev[2] = 9; dev[3] = 0; pen = '0;
    #1 check(order[0] == 2 && order[1] == 0 && order[2] == 3 && order[3] == 1, "case 1 deliver");
    deliver = 0;
    #1 check(order[0] == 1 && order[1] == 3 && order[2] == 0 && order[3] == 2, "case 1 recover");
    // hot unit 2 loses the top place for delivering
    deliver = 1; pen[2] = 20;
    #1 check(order[0] == 0 && order[3] == 2, "case 2 penalty");
    // unavailable unit 0 goes last
    avail = 4'b1110; pen = '0;
    #1 check(order[0] == 2 && order[3] == 0, "case 3 unavailable");
    for (int t = 0; t < 3000; t++) begin
      deliver = 1'($urandom);
      avail = 4'($urandom);
      for (int i = 0; i < N_UNITS; i++) begin
        dev[i] = 20'(($urandom_range(0, 3) == 0) ? 0 : int'($urandom_range(0, 2000)) - 1000);
        pen[i] = 20'(($urandom_range(0, 1) == 0) ? 0 : $urandom_range(0, 300));
      end
      #1;
      begin
        bit [N_UNITS-1:0] seen;
        bit ok;
        seen = '0; ok = 1;
        for (int r = 0; r < N_UNITS; r++) seen[order[r]] = 1;
        check(seen == '1, "permutation");
        for (int r = 0; r + 1 < N_UNITS; r++) begin
          int a, b;
          a = int'(order[r]); b = int'(order[r + 1]);
          if (!avail[a] && avail[b]) ok = 0;
          if (avail[a] && avail[b])
            if (prio(a) < prio(b) || (prio(a) == prio(b) && a > b)) ok = 0;
        end
        check(ok, $sformatf("sorted t=%0d", t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
