// tb_stagger: a step to +12 kV (-12 kV) from 0 V, from the other polarity or
// from +6 kV must show +9 kV (-9 kV) for 100 us before the full level; from
// +9 kV the full level follows at once; other steps pass after one cycle;
// changing the request during the intermediate stage abandons it. The
// 100 us is measured in clock cycles (2 clocks per microsecond here).
module tb_stagger;
  import erfa_pkg::*;
  localparam int CPU = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick_us, active, stage_start;
  level_t lvl_req, lvl_out;
  int checks = 0, failures = 0, nstages = 0;
  always #5 clk = ~clk;

  int div = 0;
  always @(posedge clk) div <= (div == CPU - 1) ? 0 : div + 1;
  assign tick_us = (div == CPU - 1);

  stagger #(.STAGGER_US(100)) dut (.clk, .rst_n, .tick_us, .lvl_req, .lvl_out, .active, .stage_start);

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

  // never a direct step onto full level from below +/-9 kV
  level_t prev = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    if ((lvl_out == 4 && prev != 4 && prev != 3) || (lvl_out == -4 && prev != -4 && prev != -3)) begin
      failures++; $display("FAIL: direct step %0d -> %0d", prev, lvl_out);
    end
    prev = lvl_out;
    if (stage_start) nstages++;
  end

  task automatic go(int from, int to, bit staggered);
    int n9;
    @(negedge clk); lvl_req = level_t'(from);
    repeat (300 * CPU) @(negedge clk);
    lvl_req = level_t'(to);
    n9 = 0;
    @(negedge clk);
    while (lvl_out != level_t'(to) && n9 < 1000) begin
      check(lvl_out == level_t'(to > 0 ? 3 : -3), "intermediate level is +/-9 kV");
      n9++;
      @(negedge clk);
    end
    if (staggered)
      check(n9 >= 100 * CPU - CPU && n9 <= 100 * CPU + 1, $sformatf("stage length %0d cycles", n9));
    else
      check(n9 == 0, $sformatf("no stage %0d -> %0d", from, to));
  endtask

  initial begin
    lvl_req = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    go(0, 4, 1);
    go(-4, 4, 1);
    go(2, 4, 1);
    go(3, 4, 0);
    go(0, -4, 1);
    go(1, -4, 1);
    go(-3, -4, 0);
    go(0, 2, 0);
    go(4, -2, 0);
    // abandon: request drops to +1 during the stage
    @(negedge clk); lvl_req = 0;
    repeat (10) @(negedge clk);
    lvl_req = 4;
    repeat (20 * CPU) @(negedge clk);
    check(active && lvl_out == 3, "stage in progress");
    lvl_req = 1;
    repeat (3) @(negedge clk);
    check(lvl_out == 1 && !active, "stage abandoned");
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      lvl_req = level_t'($urandom_range(0, 8) - 4);
      repeat ($urandom_range(1, 250)) @(negedge clk);
    end
    check(nstages > 12, "stages exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
