// tb_hf_filter: reference transitions at chosen spacings (1 us = 2 clocks
// here). Transitions at least 40 us apart all pass; a second transition
// within 40 us passes and starts a 100 us hold during which further changes
// are ignored; at the end of the hold the output takes the input. Random
// stimulus is compared cycle by cycle with a model.
module tb_hf_filter;
  import erfa_pkg::*;
  localparam int CPU = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick_us, holding, hold_start;
  level_t lvl_in, lvl_out;
  int checks = 0, failures = 0, nholds = 0;
  always #5 clk = ~clk;

  // tick every CPU cycles
  int div = 0;
  always @(posedge clk) div <= (div == CPU - 1) ? 0 : div + 1;
  assign tick_us = (div == CPU - 1);

  hf_filter #(.MIN_GAP_US(40), .HOLD_US(100)) dut (.clk, .rst_n, .tick_us, .lvl_in, .lvl_out,
                                                    .holding, .hold_start);

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

  // model
  int m_since = 40, m_hold = 0, m_out = 0;
  always @(posedge clk) if (rst_n) begin
    int ns, nh, no;
    ns = m_since; nh = m_hold; no = m_out;
    if (tick_us) begin
      if (m_since < 40) ns = m_since + 1;
      if (m_hold > 0) nh = m_hold - 1;
    end
    if (m_hold == 0 && int'(lvl_in) != m_out) begin
      no = int'(lvl_in);
      ns = 0;
      if (m_since < 40) begin nh = 100; nholds++; end
    end
    m_since <= ns; m_hold <= nh; m_out <= no;
    #1;
    check(int'(lvl_out) == m_out && holding == (m_hold != 0), "model match");
  end

  task automatic set_after(int us, int v);
    repeat (us * CPU) @(negedge clk);
    lvl_in = level_t'(v);
  endtask

  initial begin
    lvl_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    set_after(1, 1);
    set_after(50, 2);            // >= 40 us apart: passes, no hold
    repeat (4) @(negedge clk);
    check(lvl_out == 2 && !holding, "spaced transition passes");
    set_after(10, 3);            // 10 us after: passes and starts a hold
    repeat (3) @(negedge clk);
    check(lvl_out == 3 && holding, "close transition starts hold");
    set_after(20, -1);           // ignored during hold
    repeat (3) @(negedge clk);
    check(lvl_out == 3, "change ignored during hold");
    repeat (85 * CPU) @(negedge clk);
    check(lvl_out == -1 && !holding, "output catches up after 100 us");
    for (int t = 0; t < 3000; t++)
      set_after($urandom_range(0, 60), $urandom_range(0, 8) - 4);
    check(nholds > 50, "holds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
