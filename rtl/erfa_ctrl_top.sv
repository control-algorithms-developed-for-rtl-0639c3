// erfa_ctrl_top: control of the four-unit ERFA radial field amplifier.
//
// Four series-connected H-bridge units each give +3 kV, 0 V or -3 kV, so the
// amplifier output has nine levels. This top ties together:
//   reference path (every clock)
//     digital nine-state demand, or analogue demand through ref_quantizer,
//     or, in the current-amplifier modes, the voltage demand of current_loop
//     regulating to an external reference or to the wavegen scenario
//     -> limit to the available units -> hf_filter (>= 40 us between
//     transitions or a 100 us hold) -> takeover (0 V or full opposite voltage
//     on current limits) -> stagger (+/-9 kV for 100 us before +/-12 kV)
//     -> vector_mem lookup -> unit_switch_out (unit commands, bypasses)
//   vector processes (every 50 us interruption from erfa_timebase)
//     unit_energy_eval (+ switch_history) -> two unit_ranker rankings ->
//     even interruption: anticipation_ctrl rewrites the 9 vectors;
//     odd interruption:  equalizer may rotate units at the present level
//   DC-link charging (per unit, updated every interruption)
//     dclink_vref (shared: the same V0, current and L/C for every unit) ->
//     converter_reg, one per unit
// The structure follows the amplifier's control description. The order of
// the reference stages (filter before takeover so that a takeover is never
// delayed), the shared DC-link reference and the update rates are this
// design's choices. From a reference change at the input to new unit
// commands takes 3 clock cycles (filter, takeover/stagger register, command
// register) plus the 100 us stage when staggering.
module erfa_ctrl_top
  import erfa_pkg::*;
#(
  parameter int unsigned CLK_PER_US = 40,
  parameter int unsigned IRQ_US     = 50,
  parameter int unsigned MIN_GAP_US = 40,
  parameter int unsigned HOLD_US    = 100,
  parameter int unsigned STAGGER_US = 100
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // reference
  input  ref_mode_t                   ref_mode,
  input  level_t                      dig_level,
  input  logic signed [15:0]          ana_demand,   // volts
  input  logic        [11:0]          hyst,         // volts
  // current-amplifier modes
  input  logic signed [13:0]          i_ref_ext,    // external current reference, A
  input  logic                        wg_we,        // write a scenario segment
  input  logic [3:0]                  wg_addr,
  input  logic [15:0]                 wg_dur,       // microseconds
  input  logic signed [15:0]          wg_slope,     // A/us, Q8.8
  input  logic                        wg_start,
  // output current and takeover settings (amperes)
  input  logic signed [13:0]          i_out,
  input  logic        [12:0]          to_th_zero,
  input  logic        [12:0]          to_th_rev,
  input  logic        [12:0]          to_dec,
  // unit measurements and status
  input  logic [N_UNITS-1:0]          unit_ok,      // 0: unit bypassed
  input  logic [N_UNITS-1:0][11:0]    vdc,          // volts
  input  logic [N_UNITS-1:0][9:0]     tj_igbt,      // degC
  input  logic [N_UNITS-1:0][9:0]     t_res,        // degC
  input  logic [7:0]                  kc,           // Q4.4
  // converter settings and measurements
  input  logic                        conv_enable,
  input  logic [11:0]                 v0,           // volts
  input  logic [15:0]                 k_lc,         // Q8.8 ohm^2
  input  logic [N_UNITS-1:0][9:0]     idc,          // amperes
  input  logic [N_UNITS-1:0]          conv_hot,
  // unit commands
  output vector_t                     unit_cmd,
  output logic [N_UNITS-1:0]          unit_bypass,
  output level_t                      out_level,
  // converter commands
  output logic [11:0]                 vdc_ref,
  output logic [N_UNITS-1:0][9:0]     conv_iref,
  output logic [N_UNITS-1:0][11:0]    conv_u,
  output logic [N_UNITS-1:0]          conv_ki_reduced,
  // status and event pulses
  output takeover_t                   to_state,
  output logic                        to_event,
  output logic                        hf_holding,
  output logic                        hf_hold_start,
  output logic                        stg_active,
  output logic                        stg_start,
  output logic                        eq_swap,
  output logic                        antic_done,
  output logic                        irq,
  output logic                        energy_imbal,
  output logic [23:0]                 energy_avg,
  output logic signed [13:0]          i_ref,        // current reference in use
  output logic                        wg_running,
  output logic                        wg_done
);

  // ---------------- timebase
  logic tick_us, irq_odd;
  erfa_timebase #(.CLK_PER_US(CLK_PER_US), .IRQ_US(IRQ_US)) u_tb (
    .clk, .rst_n, .tick_us, .irq, .irq_odd);

  logic [2:0] navail;
  assign navail = popcount4(unit_ok);

  // ---------------- reference path
  level_t q_level, sel_level, lim_level, hf_level, to_level, stg_level;
  logic signed [13:0] wg_i_ref;
  logic signed [15:0] cl_v_dem, q_demand;
  logic               cl_enable;

  // current-amplifier modes: generator or external reference -> PI -> demand
  wavegen #(.N_SEG(16), .I_W(14)) u_wg (
    .clk, .rst_n, .tick_us, .we(wg_we), .addr(wg_addr), .dur(wg_dur), .slope(wg_slope),
    .start(wg_start), .i_ref(wg_i_ref), .running(wg_running), .done(wg_done));

  assign cl_enable = (ref_mode == REF_CURRENT) || (ref_mode == REF_WAVEGEN);
  assign i_ref     = (ref_mode == REF_WAVEGEN) ? wg_i_ref : i_ref_ext;

  current_loop u_cl (
    .clk, .rst_n, .strobe(tick_us), .enable(cl_enable), .i_ref, .i_meas(i_out), .v_dem(cl_v_dem));

  assign q_demand = (ref_mode == REF_ANALOG) ? ana_demand : cl_v_dem;

  ref_quantizer u_quant (.clk, .rst_n, .demand(q_demand), .hyst, .level(q_level));

  always_comb begin
    sel_level = (ref_mode == REF_DIGITAL) ? dig_level : q_level;
    if (sel_level > level_t'(navail))        lim_level = level_t'(navail);
    else if (sel_level < -level_t'(navail))  lim_level = -level_t'(navail);
    else                                     lim_level = sel_level;
  end

  hf_filter #(.MIN_GAP_US(MIN_GAP_US), .HOLD_US(HOLD_US)) u_hf (
    .clk, .rst_n, .tick_us, .lvl_in(lim_level), .lvl_out(hf_level),
    .holding(hf_holding), .hold_start(hf_hold_start));

  takeover u_to (
    .clk, .rst_n, .i_out, .th_zero(to_th_zero), .th_rev(to_th_rev), .dec(to_dec),
    .navail, .lvl_in(hf_level), .lvl_out(to_level), .state(to_state), .to_event);

  stagger #(.STAGGER_US(STAGGER_US)) u_stg (
    .clk, .rst_n, .tick_us, .lvl_req(to_level), .lvl_out(stg_level),
    .active(stg_active), .stage_start(stg_start));

  // ---------------- vector memory and unit commands
  logic       a_we, e_we;
  logic [3:0] a_waddr, e_waddr;
  vector_t    a_wdata, e_wdata, rd_vec;
  logic [N_UNITS-1:0] sw_event;

  vector_mem u_mem (
    .clk, .rst_n,
    .we   (a_we | e_we),
    .waddr(a_we ? a_waddr : e_waddr),
    .wdata(a_we ? a_wdata : e_wdata),
    .raddr(level_addr(stg_level)),
    .rdata(rd_vec));

  unit_switch_out u_out (
    .clk, .rst_n, .vec_in(rd_vec), .avail(unit_ok), .unit_cmd, .bypass(unit_bypass),
    .sw_event, .level(out_level));

  // ---------------- unit energy and rankings
  logic [N_UNITS-1:0][3:0]         hist;
  logic                            ev_valid, odd_q;
  logic signed [N_UNITS-1:0][19:0] dev;
  logic        [N_UNITS-1:0][19:0] pen;

  order_t                          order_del, order_rec;
  logic                            a_busy;

  switch_history u_hist (.clk, .rst_n, .irq, .sw_event, .hist);

  unit_energy_eval u_ev (
    .clk, .rst_n, .strobe(irq), .avail(unit_ok), .vdc, .tj_igbt, .t_res, .hist, .kc,
    .valid(ev_valid), .dev, .pen, .avg(energy_avg), .imbal(energy_imbal));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   odd_q <= 1'b0;
    else if (irq) odd_q <= irq_odd;
  end

  unit_ranker u_rank_del (.deliver(1'b1), .avail(unit_ok), .dev, .pen, .order(order_del));
  unit_ranker u_rank_rec (.deliver(1'b0), .avail(unit_ok), .dev, .pen, .order(order_rec));

  anticipation_ctrl u_ant (
    .clk, .rst_n, .start(ev_valid && !odd_q), .present(unit_cmd), .avail(unit_ok),
    .cur_neg(i_out[13]), .order_del, .order_rec,
    .we(a_we), .waddr(a_waddr), .wdata(a_wdata), .busy(a_busy), .done(antic_done));

  equalizer u_eq (
    .clk, .rst_n, .start(ev_valid && odd_q), .imbal(energy_imbal),
    .allow(!stg_active && !hf_holding && !a_busy && (stg_level == out_level)),
    .present(unit_cmd), .avail(unit_ok), .cur_neg(i_out[13]), .order_del, .order_rec,
    .we(e_we), .waddr(e_waddr), .wdata(e_wdata), .swap(eq_swap));

  // ---------------- DC-link reference and converter regulation
  logic vr_valid;
  dclink_vref u_vref (
    .clk, .rst_n, .start(irq), .v0, .i_out, .k_lc, .vref(vdc_ref), .valid(vr_valid),
    .busy());

  for (genvar u = 0; u < N_UNITS; u++) begin : g_conv
    converter_reg u_conv (
      .clk, .rst_n, .strobe(vr_valid), .enable(conv_enable && unit_ok[u]), .hot(conv_hot[u]),
      .vdc(vdc[u]), .vref(vdc_ref), .idc(idc[u]), .iref(conv_iref[u]), .u_cmd(conv_u[u]),
      .ki_reduced(conv_ki_reduced[u]));
  end

endmodule
