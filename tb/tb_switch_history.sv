// tb_switch_history: a switching event loads the unit's recency value with
// its maximum, every interruption then lowers it by one down to zero, and
// units are independent. Random events are compared with a model.
module tb_switch_history;
  import erfa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic irq;
  logic [N_UNITS-1:0] sw_event;
  logic [N_UNITS-1:0][3:0] hist;
  int model [N_UNITS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  switch_history #(.HIST_W(4), .HIST_MAX(15)) dut (.clk, .rst_n, .irq, .sw_event, .hist);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    irq = 0; sw_event = '0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      irq      = ($urandom_range(0, 2) == 0);
      sw_event = (t < 1000) ? 4'($urandom_range(0, 15) & $urandom_range(0, 15) & $urandom_range(0, 15))
                            : '0;
      @(posedge clk);
      for (int i = 0; i < N_UNITS; i++)
        if (sw_event[i]) model[i] = 15;
        else if (irq && model[i] > 0) model[i]--;
      #1;
      for (int i = 0; i < N_UNITS; i++) begin
        checks++;
        if (int'(hist[i]) != model[i]) begin
          failures++;
          $display("FAIL t=%0d unit %0d hist=%0d expected %0d", t, i, hist[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
