// current_loop: closed-loop current regulation for the current-amplifier
// modes.
//
// Besides its normal open-loop use as a voltage amplifier, the amplifier can
// regulate its own output current, for commissioning and tests, from an
// external or internally generated current reference. This block is the
// simplest regulator that does that: a PI controller, updated every
// microsecond (strobe), turns the current error into a voltage demand in
// volts, which then goes through the same quantizer, filter, takeover and
// staggering as an analogue voltage demand. The demand is limited to
// +/-V_LIM. The integrator is limited to the same range, held while the
// proportional part alone saturates, and cleared while the loop is disabled. Gains are Q8.8 (volts per ampere, and volts per
// ampere per microsecond for KI). That the mode exists follows the amplifier
// description; the PI structure, gains and limits are this design's choice.
// Output is registered.
module current_loop #(
  parameter int unsigned I_W   = 14,     // currents, amperes, signed
  parameter int unsigned V_W   = 16,     // demand, volts, signed
  parameter int unsigned KP    = 2560,   // 10 V/A
  parameter int unsigned KI    = 3,      // about 0.012 V/A per microsecond
  parameter int unsigned V_LIM = 13500   // beyond +/-12 kV so full level is reachable
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  strobe,
  input  logic                  enable,
  input  logic signed [I_W-1:0] i_ref,
  input  logic signed [I_W-1:0] i_meas,
  output logic signed [V_W-1:0] v_dem
);

  localparam int AW = 40;
  localparam logic signed [AW-1:0] KP_S  = AW'(KP);
  localparam logic signed [AW-1:0] KI_S  = AW'(KI);
  localparam logic signed [AW-1:0] LIM   = AW'(V_LIM);
  localparam logic signed [AW-1:0] ILIM  = AW'(V_LIM) <<< 8;

  logic signed [AW-1:0] integ_q, integ_n, err, v_n;

  always_comb begin
    err     = AW'(i_ref) - AW'(i_meas);
    // while the proportional part alone saturates the demand, the
    // integrator holds (no windup during large steps)
    if (err * KP_S > ILIM || err * KP_S < -ILIM) integ_n = integ_q;
    else                                         integ_n = integ_q + err * KI_S;
    if (integ_n > ILIM)  integ_n = ILIM;
    if (integ_n < -ILIM) integ_n = -ILIM;
    v_n = (err * KP_S + integ_n) >>> 8;
    if (v_n > LIM)  v_n = LIM;
    if (v_n < -LIM) v_n = -LIM;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ_q <= '0;
      v_dem   <= '0;
    end else if (!enable) begin
      integ_q <= '0;
      v_dem   <= '0;
    end else if (strobe) begin
      integ_q <= integ_n;
      v_dem   <= V_W'(v_n);
    end
  end

endmodule
