// tb_takeover: current profiles that cross the 0 V and reversal thresholds
// in both directions and with units bypassed. Checks the forced levels
// (0 V only for references that push the current further; full opposite
// polarity limited to the available units), the release with the decrement
// as hysteresis, the threshold scaling with available units, and random
// currents against a model of the state machine.
module tb_takeover;
  import erfa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] i_out;
  logic [12:0] th_zero, th_rev, dec;
  logic [2:0] navail;
  level_t lvl_in, lvl_out;
  takeover_t state;
  logic to_event;
  int checks = 0, failures = 0, nev = 0, nrev = 0, nzero = 0;
  always #5 clk = ~clk;

  takeover dut (.clk, .rst_n, .i_out, .th_zero, .th_rev, .dec, .navail, .lvl_in, .lvl_out,
                .state, .to_event);

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

  int ms = 0;  // 0 none, 1 zero, 2 reverse
  task automatic step(int i, int l);
    int a, tz, tr, nxt, exp;
    @(negedge clk);
    i_out = 14'(i); lvl_in = level_t'(l);
    a = (i < 0) ? -i : i;
    tz = int'(th_zero) * int'(navail) / 4;
    tr = int'(th_rev) * int'(navail) / 4;
    nxt = ms;
    case (ms)
      0: if (a >= tr) nxt = 2; else if (a >= tz) nxt = 1;
      1: if (a >= tr) nxt = 2; else if (a < tz - int'(dec)) nxt = 0;
      2: if (a < tr - int'(dec)) nxt = 1;
      default: ;
    endcase
    @(posedge clk);
    ms = nxt;
    if (ms == 1) nzero++;
    if (ms == 2) nrev++;
    #1;
    case (ms)
      1: exp = (l != 0 && ((l < 0) == (i < 0))) ? 0 : l;
      2: exp = (i < 0) ? int'(navail) : -int'(navail);
      default: exp = l;
    endcase
    check(int'(state) == ms, $sformatf("state i=%0d", i));
    check(int'(lvl_out) == exp, $sformatf("level i=%0d l=%0d out=%0d exp=%0d", i, l, lvl_out, exp));
    if (to_event) nev++;
  endtask

  initial begin
    i_out = 0; th_zero = 13'd4000; th_rev = 13'd4600; dec = 13'd300; navail = 3'd4; lvl_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    step(3900, 4);  check(lvl_out == 4, "below threshold passes");
    step(4100, 4);  check(lvl_out == 0, "0 V takeover on rising current");
    step(4100, -2); check(lvl_out == -2, "reference reducing the current passes");
    step(3800, 4);  check(lvl_out == 0, "hysteresis holds takeover");
    step(3600, 4);  check(lvl_out == 4, "released below threshold minus decrement");
    step(-4700, -3); check(lvl_out == 4, "reversal to full opposite voltage");
    step(0, 0); step(0, 0); check(state == TO_NONE, "back to normal");
    navail = 3'd3;
    step(-3100, -3); check(lvl_out == 0 && state == TO_ZERO, "with 3 units the 0 V threshold drops to 3000 A");
    step(-2600, -3); check(lvl_out == -3 && state == TO_NONE, "release below 3000 - 300 A");
    step(-3500, -1); check(lvl_out == 3 && state == TO_REVERSE, "reversal threshold drops to 3450 A");
    for (int t = 0; t < 20000; t++) begin
      navail = 3'($urandom_range(1, 4));
      step(int'($urandom_range(0, 12000)) - 6000, int'($urandom_range(0, 8)) - 4);
    end
    check(nev > 20 && nrev > 20 && nzero > 20, "takeovers exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
