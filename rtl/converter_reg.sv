// converter_reg: regulation of one unit's 12-pulse thyristor converter.
//
// The input converter only replaces the losses of the amplifier and coils.
// It is regulated as a current source charging the DC link toward its
// reference (from dclink_vref):
//   1. the DC current target is KV * (vref - vdc), limited to 0..i_lim, where
//      i_lim is 300 A, or 100 A when the semiconductors are near their
//      heating limit (hot);
//   2. the current reference rises toward the target by at most RAMP_A per
//      update (soft start, no overshoot) and falls at once;
//   3. a PI regulator on (iref - idc) gives the converter voltage demand
//      u_cmd (0..U_MAX, to the firing-angle stage). Its integral gain is
//      reduced to KI/4 while the current is below its reference by more
//      than E_BIG or the DC current is above I_HI (and still rising), which
//      limits overshoot while keeping small errors fast; with a zero
//      reference the integrator is cleared.
// Updates happen on strobe; outputs are registered. The 300 A / 100 A
// levels, the ramp and the error- and current-dependent integral gain follow
// the amplifier's converter control; the gains, the thresholds, the
// proportional outer law and the fixed-point formats (gains in Q8.8) are
// this design's choice.
module converter_reg #(
  parameter int unsigned VDC_W  = 12,
  parameter int unsigned IDC_W  = 10,     // DC current, amperes
  parameter int unsigned U_W    = 12,     // converter voltage demand
  parameter int unsigned I_NORM = 300,
  parameter int unsigned I_HOT  = 100,
  parameter int unsigned KV     = 3,      // amperes per volt of DC-link error
  parameter int unsigned RAMP_A = 5,      // reference rise per update
  parameter int unsigned KP     = 512,    // Q8.8
  parameter int unsigned KI     = 128,    // Q8.8
  parameter int unsigned E_BIG  = 50,     // amperes
  parameter int unsigned I_HI   = 250,    // amperes
  parameter int unsigned U_MAX  = 4000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             strobe,
  input  logic             enable,
  input  logic             hot,
  input  logic [VDC_W-1:0] vdc,
  input  logic [VDC_W-1:0] vref,
  input  logic [IDC_W-1:0] idc,
  output logic [IDC_W-1:0] iref,
  output logic [U_W-1:0]   u_cmd,
  output logic             ki_reduced
);

  localparam int unsigned AW = 32;
  localparam logic signed [AW-1:0] INT_MAX = AW'(U_MAX) <<< 8;
  localparam logic signed [AW-1:0] KP_S    = AW'(KP);
  localparam logic signed [AW-1:0] KI_S    = AW'(KI);
  localparam logic signed [AW-1:0] KIR_S   = AW'(KI / 4);
  localparam logic signed [AW-1:0] KV_S    = AW'(KV);

  logic signed [AW-1:0] integ_q;
  logic [IDC_W-1:0]     ilim, tgt, iref_n;
  logic signed [AW-1:0] err, verr, integ_n, u_n;
  logic [AW-1:0]        eabs;
  logic                 kred;

  always_comb begin
    ilim = hot ? IDC_W'(I_HOT) : IDC_W'(I_NORM);
    verr = AW'(vref) - AW'(vdc);
    if (!enable || verr <= 0)                     tgt = '0;
    else if (verr * KV_S >= AW'(ilim))         tgt = ilim;
    else                                          tgt = IDC_W'(verr * KV_S);
    if (tgt > iref)
      iref_n = (AW'(tgt) - AW'(iref) > AW'(RAMP_A)) ? iref + IDC_W'(RAMP_A) : tgt;
    else
      iref_n = tgt;
    err     = AW'(iref_n) - AW'(idc);
    eabs    = err[AW-1] ? AW'(-err) : AW'(err);
    kred    = !err[AW-1] && ((eabs > AW'(E_BIG)) || (idc > IDC_W'(I_HI)));
    integ_n = integ_q + err * (kred ? KIR_S : KI_S);
    if (integ_n < 0 || iref_n == '0) integ_n = '0;
    if (integ_n > INT_MAX)  integ_n = INT_MAX;
    u_n = (err * KP_S + integ_n) >>> 8;
    if (u_n < 0)            u_n = '0;
    if (u_n > AW'(U_MAX))   u_n = AW'(U_MAX);
    if (!enable) begin
      integ_n = '0;
      u_n     = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ_q    <= '0;
      iref       <= '0;
      u_cmd      <= '0;
      ki_reduced <= 1'b0;
    end else if (strobe) begin
      integ_q    <= integ_n;
      iref       <= iref_n;
      u_cmd      <= U_W'(u_n);
      ki_reduced <= kred && enable;
    end
  end

endmodule
