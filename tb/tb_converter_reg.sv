// tb_converter_reg: the regulator drives a first-order model of the
// converter and DC link (DC current lags u_cmd / 10; the DC link charges
// with the current). Checks: the current reference never rises by more
// than 5 A per update, is limited to 300 A (100 A when hot) and to 3 A/V of
// DC-link error, falls to zero at once when the link reaches its reference;
// the DC current settles on the reference without large overshoot; the
// reduced integral gain is used during large errors; disabling clears the
// outputs.
module tb_converter_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  logic strobe, enable, hot, ki_reduced;
  logic [11:0] vdc, vref, u_cmd;
  logic [9:0] idc, iref;
  int checks = 0, failures = 0, nred = 0;
  real i_m, v_m;
  always #5 clk = ~clk;

  converter_reg dut (.clk, .rst_n, .strobe, .enable, .hot, .vdc, .vref, .idc, .iref, .u_cmd, .ki_reduced);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int prev_iref = 0, max_over = 0;
  task automatic update(real dv_per_a);
    int tgt, lim;
    @(negedge clk);
    idc = 10'($rtoi(i_m));
    vdc = 12'($rtoi(v_m));
    strobe = 1;
    @(negedge clk);
    strobe = 0;
    lim = hot ? 100 : 300;
    tgt = (int'(vref) - int'(vdc)) * 3;
    if (tgt < 0 || !enable) tgt = 0;
    if (tgt > lim) tgt = lim;
    check(int'(iref) <= tgt, $sformatf("iref %0d above target %0d", iref, tgt));
    check(int'(iref) - prev_iref <= 5, "ramp rate");
    if (int'(iref) < tgt) check(int'(iref) - prev_iref == 5 || int'(iref) == tgt, "ramps while below target");
    if (ki_reduced) nred++;
    prev_iref = int'(iref);
    // plant: current lags u/10, DC link charges
    i_m = i_m + (real'(u_cmd) / 10.0 - i_m) / 4.0;
    if (i_m < 0) i_m = 0;
    if (i_m > 1000) i_m = 1000;
    v_m = v_m + i_m * dv_per_a;
    if (i_m - real'(iref) > max_over) max_over = $rtoi(i_m - real'(iref));
  endtask

  initial begin
    strobe = 0; enable = 1; hot = 0; vdc = 0; vref = 12'd3000; idc = 0;
    i_m = 0; v_m = 2000;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // long charge with a fixed reference current: link held low (no charging)
    for (int t = 0; t < 400; t++) update(0.0);
    check(iref == 300, "300 A limit");
    check(i_m > 290 && i_m < 310, $sformatf("current settles at 300 A (%0f)", i_m));
    check(max_over < 45, $sformatf("overshoot %0d A", max_over));
    hot = 1;
    for (int t = 0; t < 200; t++) update(0.0);
    check(iref == 100, "100 A when hot");
    check(i_m > 95 && i_m < 105, "current settles at 100 A");
    hot = 0;
    // charge the link to its reference
    for (int t = 0; t < 3000; t++) update(0.05);
    check(v_m > 2950 && v_m < 3100, $sformatf("link charged near reference (%0f)", v_m));
    check(nred > 0, "reduced integral gain used");
    vref = 12'd2500;
    update(0.0);
    check(iref == 0, "reference falls at once");
    enable = 0;
    update(0.0);
    check(iref == 0 && u_cmd == 0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
