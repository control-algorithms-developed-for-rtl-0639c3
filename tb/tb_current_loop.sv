// tb_current_loop: (1) random references and measurements, every output
// compared with a model of the PI law (Q8.8 gains, integrator and output
// limited to +/-13.5 kV, integration held while the proportional part
// saturates, cleared when disabled); (2) closed loop around a
// 5 mH coil model with the continuous demand: the current must settle on
// steps of the reference.
module tb_current_loop;
  logic clk = 1'b0, rst_n = 1'b0;
  logic strobe, enable;
  logic signed [13:0] i_ref, i_meas;
  logic signed [15:0] v_dem;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  current_loop dut (.clk, .rst_n, .strobe, .enable, .i_ref, .i_meas, .v_dem);

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

  longint integ = 0;
  task automatic step(int r, int m, bit en);
    longint e, v;
    @(negedge clk);
    i_ref = 14'(r); i_meas = 14'(m); enable = en; strobe = 1;
    @(negedge clk);
    strobe = 0;
    if (!en) begin
      integ = 0; v = 0;
    end else begin
      e = longint'(r) - longint'(m);
      if (e * 2560 <= 13500 * 256 && e * 2560 >= -13500 * 256) integ += e * 3;
      if (integ > 13500 * 256) integ = 13500 * 256;
      if (integ < -13500 * 256) integ = -13500 * 256;
      v = (e * 2560 + integ) >>> 8;
      if (v > 13500) v = 13500;
      if (v < -13500) v = -13500;
    end
    check(longint'(v_dem) == v, $sformatf("v_dem %0d expected %0d", v_dem, v));
  endtask

  initial begin
    real i_m;
    strobe = 0; enable = 0; i_ref = 0; i_meas = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++)
      step(int'($urandom_range(0, 4000)) - 2000, int'($urandom_range(0, 4000)) - 2000,
           ($urandom_range(0, 20) != 0));
    step(0, 0, 0);
    // closed loop
    i_m = 0.0;
    for (int k = 0; k < 3; k++) begin
      int tgt;
      tgt = (k == 0) ? 1000 : (k == 1) ? -500 : 2500;
      for (int t = 0; t < 5000; t++) begin
        @(negedge clk);
        i_ref = 14'(tgt); i_meas = 14'($rtoi(i_m)); enable = 1; strobe = 1;
        @(negedge clk);
        strobe = 0;
        i_m += real'(v_dem) * 1.0e-6 / 0.005;
      end
      check(i_m > real'(tgt) - 20.0 && i_m < real'(tgt) + 20.0, $sformatf("settles at %0d A (%0f)", tgt, i_m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
