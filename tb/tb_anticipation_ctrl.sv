// tb_anticipation_ctrl: after start the block must write the nine levels
// -4..+4 to addresses 0..8 on nine consecutive cycles, each entry holding a
// vector that produces its level (limited to the available units) without
// mixing polarities; done pulses once after the ninth write and a second
// start while busy is ignored.
module tb_anticipation_ctrl;
  import erfa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, cur_neg, we, busy, done;
  vector_t present, wdata;
  logic [N_UNITS-1:0] avail;
  order_t order_del, order_rec;
  logic [3:0] waddr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  anticipation_ctrl dut (.clk, .rst_n, .start, .present, .avail, .cur_neg, .order_del, .order_rec,
                         .we, .waddr, .wdata, .busy, .done);

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
    start = 0; cur_neg = 0; present = '{default: U_ZERO}; avail = 4'hF;
    order_del = '{3: 2'd3, 2: 2'd2, 1: 2'd1, 0: 2'd0};
    order_rec = '{3: 2'd0, 2: 2'd1, 1: 2'd2, 0: 2'd3};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int na, nwr, ndone;
      avail = (t % 3 == 0) ? 4'($urandom) : 4'hF;
      cur_neg = 1'($urandom);
      na = 0;
      for (int i = 0; i < 4; i++) na += avail[i];
      @(negedge clk);
      check(!we && !busy, "idle before start");
      start = 1;
      @(negedge clk);
      start = 0;
      nwr = 0; ndone = 0;
      for (int c = 0; c < 12; c++) begin
        if (c == 3) start = 1;        // ignored while busy
        if (we) begin
          int lvl;
          lvl = nwr - 4;
          if (lvl > na) lvl = na;
          if (lvl < -na) lvl = -na;
          check(waddr == 4'(nwr), $sformatf("address order t=%0d", t));
          check(int'(vector_level(wdata)) == lvl, $sformatf("entry level t=%0d a=%0d", t, nwr));
          nwr++;
        end
        if (done) begin
          ndone++;
          check(nwr == 9, "done after nine writes");
        end
        @(negedge clk);
        start = 0;
      end
      check(nwr == 9, $sformatf("nine writes t=%0d (%0d)", t, nwr));
      check(ndone == 1, "one done pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
