// tb_unit_energy_eval: random DC-link voltages, temperatures, histories,
// availability and correction factors; the registered deviation, penalty,
// average and 10 % imbalance flag are compared with values computed here in
// 64-bit arithmetic from the definitions (energy = Vdc^2, average over the
// available units, resistor temperature scaled 400 degC -> 90 degC, penalty
// = kc/16 * (Tjmax + history)). Also checks the one-cycle valid latency.
module tb_unit_energy_eval;
  import erfa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic strobe, valid, imbal;
  logic [N_UNITS-1:0] avail;
  logic [N_UNITS-1:0][11:0] vdc;
  logic [N_UNITS-1:0][9:0] tj, tr;
  logic [N_UNITS-1:0][3:0] hist;
  logic [7:0] kc;
  logic signed [N_UNITS-1:0][19:0] dev;
  logic [N_UNITS-1:0][19:0] pen;
  logic [23:0] avg;
  int checks = 0, failures = 0, n_imbal = 0;
  always #5 clk = ~clk;

  unit_energy_eval dut (.clk, .rst_n, .strobe, .avail, .vdc, .tj_igbt(tj), .t_res(tr), .hist, .kc,
                        .valid, .dev, .pen, .avg, .imbal);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [N_UNITS];
    longint sum, av, d, tjm, teq, p;
    int na;
    bit imb;
    strobe = 0; avail = '1; vdc = '0; tj = '0; tr = '0; hist = '0; kc = 8'd16;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      avail = (t % 4 == 0) ? 4'($urandom_range(1, 15)) : 4'hF;
      for (int i = 0; i < N_UNITS; i++) begin
        vdc[i]  = 12'((t % 3 == 0) ? $urandom_range(2900, 3100) : $urandom_range(1500, 3500));
        tj[i]   = 10'($urandom_range(20, 125));
        tr[i]   = 10'($urandom_range(20, 600));
        hist[i] = 4'($urandom_range(0, 15));
      end
      kc = 8'($urandom_range(0, 255));
      strobe = 1'b1;
      @(negedge clk);
      strobe = 1'b0;
      check(valid, "valid one cycle after strobe");
      sum = 0; na = 0;
      for (int i = 0; i < N_UNITS; i++) begin
        e[i] = longint'(vdc[i]) * longint'(vdc[i]);
        if (avail[i]) begin sum += e[i]; na++; end
      end
      av = (na == 0) ? 0 : sum / longint'(na);
      check(longint'(avg) == av, $sformatf("avg %0d vs %0d", avg, av));
      imb = 0;
      for (int i = 0; i < N_UNITS; i++) begin
        if (avail[i]) begin
          d = e[i] - av;
          if ((d < 0 ? -d : d) * 10 > av) imb = 1;
          teq = longint'(tr[i]) * 90 / 400;
          tjm = (longint'(tj[i]) > teq) ? longint'(tj[i]) : teq;
          p = ((tjm + longint'(hist[i])) * longint'(kc)) / 16;
          check(longint'(signed'(dev[i])) == (d >>> 12), $sformatf("dev[%0d] %0d vs %0d", i, dev[i], d >>> 12));
          check(longint'(pen[i]) == p, $sformatf("pen[%0d] %0d vs %0d", i, pen[i], p));
        end else begin
          check(dev[i] == 0 && pen[i] == 0, "unavailable unit zero");
        end
      end
      check(imbal == imb, "imbalance flag");
      if (imb) n_imbal++;
      @(negedge clk);
      check(!valid, "valid is a pulse");
    end
    check(n_imbal > 10 && n_imbal < 490, "imbalance seen both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
