// tb_unit_switch_out: the vector read from memory reaches the unit commands
// one cycle later; unavailable units are forced to 0 V and bypassed; a
// switching event is flagged exactly for units whose command changed; the
// level output is the sum of the unit outputs.
module tb_unit_switch_out;
  import erfa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  vector_t vec_in, unit_cmd;
  logic [N_UNITS-1:0] avail, bypass, sw_event;
  level_t level;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  unit_switch_out dut (.clk, .rst_n, .vec_in, .avail, .unit_cmd, .bypass, .sw_event, .level);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vector_t exp, prev;
    int lv;
    vec_in = '{default: U_ZERO}; avail = 4'hF;
    prev = '{default: U_ZERO};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      unit_state_t st;
      @(negedge clk);
      st = ($urandom_range(0, 1) != 0) ? U_POS : U_NEG;
      for (int i = 0; i < 4; i++) vec_in[i] = ($urandom_range(0, 1) != 0) ? st : U_ZERO;
      avail = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hF;
      lv = 0;
      for (int i = 0; i < 4; i++) begin
        exp[i] = avail[i] ? vec_in[i] : U_ZERO;
        lv += (exp[i] == U_POS) ? 1 : (exp[i] == U_NEG) ? -1 : 0;
      end
      @(posedge clk);
      #1;
      check(unit_cmd == exp, $sformatf("command t=%0d", t));
      check(bypass == ~avail, "bypass of unavailable units");
      check(int'(level) == lv, "level");
      for (int i = 0; i < 4; i++) check(sw_event[i] == (exp[i] != prev[i]), "switch event");
      prev = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
