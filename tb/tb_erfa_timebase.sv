// tb_erfa_timebase: checks the microsecond tick period, the interruption
// period and the even/odd alternation of the interruptions, at a reduced
// clock (4 cycles per microsecond, interruption every 5 us).
module tb_erfa_timebase;
  localparam int CPU = 4, IUS = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick_us, irq, irq_odd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  erfa_timebase #(.CLK_PER_US(CPU), .IRQ_US(IUS)) dut (.clk, .rst_n, .tick_us, .irq, .irq_odd);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_tick = -1, last_irq = -1, n_irq = 0, n_tick = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (tick_us) begin
      if (last_tick >= 0) check(cyc - last_tick == CPU, "tick period");
      last_tick <= cyc;
      n_tick <= n_tick + 1;
    end
    if (irq) begin
      if (last_irq >= 0) check(cyc - last_irq == CPU * IUS, "irq period");
      check(irq_odd == n_irq[0], "irq parity");
      check(tick_us, "irq coincides with a tick");
      last_irq <= cyc;
      n_irq <= n_irq + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (CPU * IUS * 12 + 5) @(posedge clk);
    check(n_irq >= 11, "number of interruptions");
    check(n_tick >= 11 * IUS, "number of ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
