// tb_dclink_vref: random V0, output current and L/C settings. The reference
// must equal floor(sqrt(V0^2 - (L/C) I^2)), with (L/C) I^2 taken as
// k_lc * I^2 / 256 and the result floored at 1000 V, and arrive with a valid
// pulse in the 14th cycle after start (sampling, one cycle per result bit,
// output register).
module tb_dclink_vref;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, valid, busy;
  logic [11:0] v0, vref;
  logic signed [13:0] i_out;
  logic [15:0] k_lc;
  int checks = 0, failures = 0, nfloor = 0;
  always #5 clk = ~clk;

  dclink_vref dut (.clk, .rst_n, .start, .v0, .i_out, .k_lc, .vref, .valid, .busy);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; v0 = 12'd3000; i_out = 0; k_lc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      longint rad, term, r;
      int lat;
      @(negedge clk);
      v0    = 12'($urandom_range(800, 4000));
      i_out = 14'(int'($urandom_range(0, 10000)) - 5000);
      k_lc  = 16'($urandom_range(0, 512));
      term  = longint'(k_lc) * longint'(i_out) * longint'(i_out) / 256;
      if (longint'(v0) * v0 <= term + 1000000 || v0 <= 1000) begin rad = 1000000; nfloor++; end
      else rad = longint'(v0) * v0 - term;
      r = 0;
      while ((r + 1) * (r + 1) <= rad) r++;
      start = 1;
      @(negedge clk);
      start = 0;
      i_out = 0; v0 = 0;          // inputs are sampled at start
      lat = 1;
      while (!valid && lat < 40) begin @(negedge clk); lat++; end
      check(lat == 14, $sformatf("latency %0d", lat));
      check(longint'(vref) == r, $sformatf("vref %0d expected %0d", vref, r));
    end
    check(nfloor > 10 && nfloor < 1900, "floor exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
