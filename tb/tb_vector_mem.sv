// tb_vector_mem: reset clears all nine entries; random writes are read back
// asynchronously against a model; out-of-range addresses are neither written
// nor read.
module tb_vector_mem;
  import erfa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we;
  logic [3:0] waddr, raddr;
  vector_t wdata, rdata;
  vector_t model [N_LEVELS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vector_mem dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic vector_t rand_vec();
    vector_t v;
    for (int i = 0; i < N_UNITS; i++) v[i] = unit_state_t'($urandom_range(0, 2));
    return v;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < N_LEVELS; a++) begin
      model[a] = '{default: U_ZERO};
      raddr = 4'(a);
      #1 check(rdata == model[a], "cleared at reset");
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 4'($urandom_range(0, 10));
      wdata = rand_vec();
      raddr = 4'($urandom_range(0, 10));
      #1;
      if (int'(raddr) < N_LEVELS) check(rdata == model[raddr], $sformatf("read t=%0d", t));
      else                  check(rdata == '{default: U_ZERO}, "out of range read");
      @(posedge clk);
      if (we && int'(waddr) < N_LEVELS) model[waddr] = wdata;
      #1;
      if (int'(raddr) < N_LEVELS) check(rdata == model[raddr], $sformatf("read after write t=%0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
