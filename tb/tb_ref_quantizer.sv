// tb_ref_quantizer: slow ramps and random steps of the analogue demand with
// several hysteresis settings, compared with a model of the band rule: the
// level moves to round(demand / 3000 V) (limited to +/-4) only when the
// demand leaves level*3000 +/- (1500 + hyst). Also checks that small noise
// around a threshold does not toggle the level.
module tb_ref_quantizer;
  import erfa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] demand;
  logic [11:0] hyst;
  level_t level;
  int model = 0;
  int checks = 0, failures = 0, toggles = 0;
  always #5 clk = ~clk;

  ref_quantizer dut (.clk, .rst_n, .demand, .hyst, .level);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int nearest(int v);
    int n;
    n = (v >= 0) ? (v + 1500) / 3000 : -((-v + 1500) / 3000);
    if (n > 4) n = 4;
    if (n < -4) n = -4;
    return n;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int v);
    int e;
    @(negedge clk);
    demand = 16'(v);
    @(posedge clk);
    e = v - model * 3000;
    if (e > 1500 + int'(hyst) || e < -(1500 + int'(hyst))) model = nearest(v);
    #1 check(int'(level) == model, $sformatf("v=%0d hyst=%0d level=%0d model=%0d", v, hyst, level, model));
  endtask

  initial begin
    demand = 0; hyst = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int h = 0; h < 3; h++) begin
      hyst = 12'(h * 300);
      for (int v = -14000; v <= 14000; v += 37) step(v);
      for (int v = 14000; v >= -14000; v -= 41) step(v);
    end
    for (int t = 0; t < 5000; t++) begin
      hyst = 12'($urandom_range(0, 1000));
      step($urandom_range(0, 30000) - 15000);
    end
    // noise around the +1/+2 threshold with 200 V hysteresis
    hyst = 12'd200;
    step(4400);
    begin
      level_t l0;
      l0 = level;
      for (int t = 0; t < 200; t++) begin
        step(4500 + int'($urandom_range(0, 300)) - 150);
        if (level != l0) toggles++;
      end
      check(toggles == 0, "hysteresis stops toggling on noise");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
