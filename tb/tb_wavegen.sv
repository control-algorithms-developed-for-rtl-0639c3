// tb_wavegen: writes scenarios into the segment table and compares the
// reference microsecond by microsecond with a model (start at 0 A, add the
// segment slope each microsecond, move on after the duration, stop at a
// zero-duration entry or the last one, hold the value). Also checks the done
// pulse, that writes are ignored while running, saturation, and an empty
// scenario.
module tb_wavegen;
  localparam int CPU = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick_us, we, start, running, done;
  logic [3:0] addr;
  logic [15:0] dur;
  logic signed [15:0] slope;
  logic signed [13:0] i_ref;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  int div = 0;
  always @(posedge clk) div <= (div == CPU - 1) ? 0 : div + 1;
  assign tick_us = (div == CPU - 1);

  wavegen #(.N_SEG(16), .I_W(14)) dut (.clk, .rst_n, .tick_us, .we, .addr, .dur, .slope, .start,
                                       .i_ref, .running, .done);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_dur [16];
  int m_slope [16];

  task automatic wr(int a, int d, int s);
    @(negedge clk);
    we = 1; addr = 4'(a); dur = 16'(d); slope = 16'(s);
    @(negedge clk);
    we = 0;
    m_dur[a] = d; m_slope[a] = s;
  endtask

  // run the programmed scenario, checking every microsecond
  task automatic run(int nseg);
    longint acc;
    int ndone;
    acc = 0; ndone = 0;
    for (int s = 0; s < nseg; s++) 
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(running, "running after start");
    for (int s = 0; s < nseg; s++) begin
      for (int u = 0; u < m_dur[s]; u++) begin
        @(posedge clk iff tick_us);
        acc += longint'(m_slope[s]);
        if (acc > 8191 * 256) acc = 8191 * 256;
        if (acc < -8191 * 256) acc = -8191 * 256;
        #1 check(longint'(i_ref) == (acc >>> 8), $sformatf("seg %0d us %0d: %0d vs %0d", s, u, i_ref, acc >>> 8));
      end
      if (s == 1) begin
        // a write while running must be ignored
        @(negedge clk); we = 1; addr = 4'(s + 1); dur = 16'd1; slope = 16'sd0;
        @(negedge clk); we = 0;
      end
    end
    repeat (6) begin
      @(negedge clk);
      if (done) ndone++;
    end
    check(!running, "stopped at end of scenario");
    check(ndone == 1, "one done pulse");
    repeat (20) @(negedge clk);
    check(longint'(i_ref) == (acc >>> 8), "value held after the end");
  endtask

  initial begin
    we = 0; start = 0; addr = 0; dur = 0; slope = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // ramp up 2 A/us for 500 us, hold 300 us, ramp down -1.5 A/us for 400 us
    wr(0, 500, 512); wr(1, 300, 0); wr(2, 400, -384); wr(3, 0, 0);
    run(3);
    // sixteen random segments, fractional slopes, saturation possible
    for (int a = 0; a < 16; a++) wr(a, $urandom_range(1, 200), int'($urandom_range(0, 40000)) - 20000);
    run(16);
    // empty scenario: done at once, reference 0
    wr(0, 0, 100);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    check(done && !running && i_ref == 0, "empty scenario");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
