// tb_erfa_ctrl_top: end-to-end run of the amplifier control at its default
// parameters (40 MHz clock, 50 us interruption, 40/100 us filter, 100 us
// stagger) against a model of the power circuit, advanced every microsecond:
//   load current  dI/dt = Vout / L,  L = 5 mH
//   DC link       dVdc_i/dt = (-s_i * I + Idc_i) / C,  C = 50 mF per unit
//   converter     Idc_i lags conv_u_i / 10 by four 50 us updates
// where s_i is the unit's output (+1/0/-1). Unit 2 starts 300 V low so the
// energies are out of balance. The run goes through: level steps, DC-link
// equalization, two close reference transitions (filter hold), a step to
// +12 kV (staggered), a current takeover to 0 V and one to full opposite
// voltage, the analogue demand with hysteresis, closed-loop current control
// from an external reference and from the waveform generator, a bypassed
// unit and a hot converter. Every cycle it checks that no vector mixes polarities, that a
// bypassed unit is at 0 V and that full voltage is never reached from below
// +/-9 kV in one step. Each mechanism is counted and must occur.
module tb_erfa_ctrl_top;
  import erfa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5ns clk = ~clk;   // 40 MHz

  ref_mode_t ref_mode;
  level_t dig_level, out_level;
  logic signed [15:0] ana_demand;
  logic [11:0] hyst;
  logic signed [13:0] i_out;
  logic [12:0] to_th_zero, to_th_rev, to_dec;
  logic [N_UNITS-1:0] unit_ok, unit_bypass, conv_hot, conv_ki_reduced;
  logic [N_UNITS-1:0][11:0] vdc, conv_u;
  logic [N_UNITS-1:0][9:0] tj_igbt, t_res, idc, conv_iref;
  logic [7:0] kc;
  logic conv_enable;
  logic [11:0] v0, vdc_ref;
  logic [15:0] k_lc;
  vector_t unit_cmd;
  takeover_t to_state;
  logic to_event, hf_holding, hf_hold_start, stg_active, stg_start, eq_swap, antic_done, irq,
        energy_imbal;
  logic [23:0] energy_avg;
  logic signed [13:0] i_ref_ext, i_ref;
  logic wg_we, wg_start, wg_running, wg_done;
  logic [3:0] wg_addr;
  logic [15:0] wg_dur;
  logic signed [15:0] wg_slope;

  erfa_ctrl_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- power circuit model
  real i_load = 0.0, i_dist = 0.0;
  real v_m [N_UNITS];
  real idc_m [N_UNITS];
  initial begin
    foreach (v_m[i]) begin v_m[i] = 3000.0; idc_m[i] = 0.0; end
    v_m[2] = 2700.0;
  end
  always #1us begin
    real vout;
    vout = 0.0;
    for (int i = 0; i < N_UNITS; i++) begin
      real s;
      s = (unit_cmd[i] == U_POS) ? 1.0 : (unit_cmd[i] == U_NEG) ? -1.0 : 0.0;
      vout += s * v_m[i];
      v_m[i] += (-s * i_load + idc_m[i]) * 1.0e-6 / 0.05;
    end
    i_load += vout * 1.0e-6 / 0.005;
  end
  always @(posedge clk) if (irq)
    for (int i = 0; i < N_UNITS; i++) idc_m[i] += (real'(conv_u[i]) / 10.0 - idc_m[i]) / 4.0;

  always_comb begin
    int it;
    it = $rtoi(i_load + i_dist);
    if (it > 8000) it = 8000;
    if (it < -8000) it = -8000;
    i_out = 14'(it);
    for (int i = 0; i < N_UNITS; i++) begin
      vdc[i] = 12'($rtoi(v_m[i]));
      idc[i] = 10'($rtoi(idc_m[i] < 0.0 ? 0.0 : idc_m[i]));
      tj_igbt[i] = 10'd60 + 10'(i * 5);
      t_res[i]   = 10'd150;
    end
  end

  // ---------------- monitors and mechanism counters
  int n_antic = 0, n_swap = 0, n_hold = 0, n_stagger = 0, n_to_zero = 0, n_to_rev = 0,
      n_bypass = 0, n_analog = 0, n_ilim = 0, n_hot = 0, n_kired = 0, n_imbal = 0,
      n_curmode = 0, n_wavegen = 0;
  level_t prev_level = 0;
  takeover_t prev_to = TO_NONE;
  always @(posedge clk) if (rst_n) begin
    bit has_pos, has_neg;
    #1;
    has_pos = 0; has_neg = 0;
    for (int i = 0; i < N_UNITS; i++) begin
      if (unit_cmd[i] == U_POS) has_pos = 1;
      if (unit_cmd[i] == U_NEG) has_neg = 1;
      if (unit_bypass[i] && unit_cmd[i] != U_ZERO) begin
        failures++; $display("FAIL @%0t: bypassed unit %0d active", $time, i);
      end
    end
    if (has_pos && has_neg) begin failures++; $display("FAIL @%0t: mixed polarity", $time); end
    if ((out_level == 4 && prev_level < 3) || (out_level == -4 && prev_level > -3)) begin
      failures++; $display("FAIL @%0t: direct step to full voltage", $time);
    end
    if (eq_swap) n_swap++;
    if (antic_done) n_antic++;
    if (hf_hold_start) n_hold++;
    if (stg_start) n_stagger++;
    if (to_state == TO_ZERO && prev_to == TO_NONE) n_to_zero++;
    if (to_state == TO_REVERSE && prev_to != TO_REVERSE) n_to_rev++;
    if (|conv_ki_reduced) n_kired++;
    if (irq && energy_imbal) n_imbal++;
    for (int i = 0; i < N_UNITS; i++) if (conv_iref[i] == 10'd300) n_ilim++;
    prev_level = out_level;
    prev_to = to_state;
  end

  // a swap must not move the output level
  always @(posedge clk) if (rst_n && eq_swap) begin
    level_t l0;
    l0 = out_level;
    repeat (3) @(posedge clk);
    #1 check(out_level == l0, "equalization keeps the output level");
  end

  task automatic wait_us(int us);
    repeat (us * 40) @(posedge clk);
  endtask

  // set a digital level and check it reaches the output in at most 4 cycles
  task automatic wg_write(int a, int d, int sl);
    @(negedge clk);
    wg_we = 1'b1; wg_addr = 4'(a); wg_dur = 16'(d); wg_slope = 16'(sl);
    @(negedge clk);
    wg_we = 1'b0;
  endtask

  task automatic set_level(int l, int exp);
    int n;
    @(negedge clk);
    dig_level = level_t'(l);
    n = 0;
    while (int'(out_level) != exp && n < 10) begin @(negedge clk); n++; end
    check(int'(out_level) == exp, $sformatf("level %0d reached (out %0d)", exp, out_level));
    check(n <= 4, $sformatf("level %0d latency %0d cycles", exp, n));
  endtask

  initial begin
    i_ref_ext = '0; wg_we = 1'b0; wg_start = 1'b0; wg_addr = '0; wg_dur = '0; wg_slope = '0;
    ref_mode = REF_DIGITAL; dig_level = 0; ana_demand = 0; hyst = 12'd300;
    to_th_zero = 13'd4000; to_th_rev = 13'd4600; to_dec = 13'd300;
    unit_ok = 4'hF; kc = 8'd16; conv_enable = 1; v0 = 12'd3000; k_lc = 16'd6;
    conv_hot = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait_us(120);                      // first anticipation fills the table

    // ---- level steps and equalization at +2 (positive current)
    set_level(1, 1);
    wait_us(60);
    set_level(2, 2);
    begin
      real spread0, spread1, mx, mn;
      mx = -1e9; mn = 1e9;
      foreach (v_m[i]) begin if (v_m[i] > mx) mx = v_m[i]; if (v_m[i] < mn) mn = v_m[i]; end
      spread0 = mx - mn;
      check(unit_cmd[2] == U_ZERO, "low-energy unit 2 not chosen to deliver");
      wait_us(1500);
      mx = -1e9; mn = 1e9;
      foreach (v_m[i]) begin if (v_m[i] > mx) mx = v_m[i]; if (v_m[i] < mn) mn = v_m[i]; end
      spread1 = mx - mn;
      check(spread1 < spread0, $sformatf("DC links equalized: spread %0f -> %0f V", spread0, spread1));
    end
    // ---- bring the current back near zero
    set_level(-2, -2);
    while (i_load > 100.0) @(posedge clk);
    set_level(0, 0);
    wait_us(60);

    // ---- two transitions 10 us apart: hold, third change ignored
    set_level(1, 1);
    wait_us(10);
    set_level(2, 2);
    check(hf_holding, "filter hold started");
    wait_us(20);
    @(negedge clk) dig_level = 3;
    wait_us(20);
    check(out_level == 2, "change ignored during hold");
    wait_us(70);
    check(out_level == 3, "output catches up after the hold");
    set_level(0, 0);                   // again within 40 us: a second hold
    wait_us(150);

    // ---- staggered step to +12 kV, held until the current takeover
    @(negedge clk) dig_level = 4;
    wait_us(2);
    check(out_level == 3, "+9 kV intermediate stage");
    wait_us(90);
    check(out_level == 3, "+9 kV held about 100 us");
    wait_us(12);
    check(out_level == 4, "+12 kV after the stage");
    while (to_state == TO_NONE && i_load < 6000.0) @(posedge clk);
    check(to_state == TO_ZERO, "0 V takeover at the current limit");
    wait_us(2);
    check(out_level == 0, "takeover sets 0 V");
    // ---- disturbance pushes the current over the reversal limit
    i_dist = 800.0;
    wait_us(2);
    check(to_state == TO_REVERSE, "reversal takeover");
    wait_us(110);
    check(out_level == -4, "full opposite voltage (after stagger)");
    @(negedge clk) dig_level = -2;    // a reference that reduces the current
    i_dist = 0.0;
    while (to_state != TO_NONE) @(posedge clk);
    check(out_level == -2, "reference back after the takeover");
    while (i_load > 200.0) begin
      @(negedge clk) dig_level = -1;
      wait_us(50);
    end
    set_level(0, 0);
    wait_us(60);

    // ---- analogue demand with hysteresis
    ref_mode = REF_ANALOG;
    n_analog++;
    ana_demand = 16'sd6100;
    wait_us(1);
    check(out_level == 2, "analogue 6.1 kV gives +6 kV");
    wait_us(60);
    ana_demand = 16'sd7600;            // 1600 V from the +6 kV centre: inside 1500 + 300
    wait_us(60);
    check(out_level == 2, "hysteresis keeps +6 kV at 7.6 kV");
    ana_demand = 16'sd7900;
    wait_us(60);
    check(out_level == 3, "7.9 kV gives +9 kV");
    ana_demand = -16'sd3100;
    wait_us(60);
    check(out_level == -1, "-3.1 kV gives -3 kV");
    ana_demand = 16'sd0;
    wait_us(60);
    ref_mode = REF_DIGITAL;
    while (i_load > 200.0 || i_load < -200.0) begin
      @(negedge clk) dig_level = (i_load > 0) ? -1 : 1;
      wait_us(50);
    end
    set_level(0, 0);
    wait_us(60);

    // ---- current amplifier, external reference of 500 A
    ref_mode = REF_CURRENT;
    i_ref_ext = 14'sd500;
    wait_us(2500);
    check(i_load > 400.0 && i_load < 600.0, $sformatf("current loop holds 500 A (%0f)", i_load));
    n_curmode++;
    i_ref_ext = 14'sd0;
    wait_us(2500);
    check(i_load > -100.0 && i_load < 100.0, $sformatf("current loop back to 0 A (%0f)", i_load));

    // ---- current amplifier, internal scenario: 1 A/us up to 1000 A, hold
    // 1 ms, 1 A/us down to 0 A
    wg_write(0, 1000, 256);
    wg_write(1, 1000, 0);
    wg_write(2, 1000, -256);
    wg_write(3, 0, 0);
    ref_mode = REF_WAVEGEN;
    @(negedge clk) wg_start = 1'b1;
    @(negedge clk) wg_start = 1'b0;
    check(wg_running, "scenario running");
    wait_us(1500);
    check(i_ref == 14'sd1000, $sformatf("scenario reference 1000 A (%0d)", i_ref));
    check(i_load > 850.0 && i_load < 1150.0, $sformatf("current follows the scenario (%0f)", i_load));
    n_wavegen++;
    while (!wg_done) @(posedge clk);
    check(i_ref == 14'sd0, "scenario ends at 0 A");
    wait_us(2500);
    check(i_load > -100.0 && i_load < 100.0, $sformatf("current back to 0 A after the scenario (%0f)", i_load));
    ref_mode = REF_DIGITAL;
    set_level(0, 0);
    wait_us(60);

    // ---- unit 3 bypassed: +12 kV demand limited to +9 kV, no stagger
    @(negedge clk) unit_ok = 4'b0111;
    n_bypass++;
    wait_us(120);
    check(unit_bypass == 4'b1000, "bypass command");
    set_level(4, 3);
    wait_us(60);
    check(unit_cmd[3] == U_ZERO, "bypassed unit at 0 V");
    set_level(0, 0);
    unit_ok = 4'hF;
    wait_us(60);

    // ---- hot converter on unit 2 limited to 100 A
    conv_hot[2] = 1'b1;
    v_m[2] = 2700.0;
    wait_us(400);
    check(conv_iref[2] <= 10'd100 && conv_iref[2] > 10'd0, $sformatf("hot converter limited to 100 A (%0d)", conv_iref[2]));
    n_hot++;
    check(vdc_ref > 12'd2900 && vdc_ref <= 12'd3000, "DC-link reference near V0 at low current");

    // ---- every mechanism happened
    check(n_antic > 10, $sformatf("anticipation runs %0d", n_antic));
    check(n_swap > 0, $sformatf("equalization swaps %0d", n_swap));
    check(n_imbal > 0, "energy imbalance detected");
    check(n_hold > 0, "filter holds");
    check(n_stagger > 0, "staggered steps");
    check(n_to_zero > 0, "0 V takeovers");
    check(n_to_rev > 0, "reversal takeovers");
    check(n_ilim > 0, "converter at 300 A");
    check(n_kired > 0, "reduced integral gain");
    check(n_analog > 0 && n_bypass > 0 && n_hot > 0, "analogue mode, bypass, hot converter");
    check(n_curmode > 0 && n_wavegen > 0, "current loop and waveform generator");
    $display("mechanisms: antic=%0d swap=%0d hold=%0d stagger=%0d to_zero=%0d to_rev=%0d ilim=%0d kired=%0d",
             n_antic, n_swap, n_hold, n_stagger, n_to_zero, n_to_rev, n_ilim, n_kired);
    $display("mechanisms: analog=%0d current=%0d wavegen=%0d bypass=%0d hot=%0d", n_analog, n_curmode, n_wavegen, n_bypass, n_hot);
    $display("simulated time %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
