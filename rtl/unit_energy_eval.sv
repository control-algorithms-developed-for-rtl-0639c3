// unit_energy_eval: evaluation of the "unit energy" of each unit.
//
// Follows the merging scheme of the amplifier control: the DC-link energy of
// a unit is taken as proportional to Vdc^2; its deviation from the average of
// the available units is combined with the unit's maximum junction
// temperature and its switching history. The filter-resistor temperature is
// scaled so that 400 degC on the resistor counts as 90 degC on the IGBTs and
// the larger of the two is used as Tj max. A correction factor kc weights the
// temperature plus history term against the energy deviation.
//
// Outputs, registered on the cycle after strobe (valid pulses then):
//   dev[i]   signed energy deviation Vdc_i^2 - avg, in units of 2^DEV_SHIFT V^2
//   pen[i]   penalty = kc * (Tjmax_i + hist_i) / 16 (kc is unsigned Q4.4)
//   imbal    some available unit deviates from the average by more than
//            IMBAL_PCT percent (10 % in the amplifier description)
// Unavailable (bypassed) units are excluded from the average and get zero
// deviation and penalty. Scaling of the terms and the Q4.4 factor are this
// design's choice.
module unit_energy_eval
  import erfa_pkg::*;
#(
  parameter int unsigned VDC_W     = 12,   // DC-link voltage in volts
  parameter int unsigned TEMP_W    = 10,   // temperatures in degC
  parameter int unsigned HIST_W    = 4,
  parameter int unsigned DEV_SHIFT = 12,   // energy deviation scaling
  parameter int unsigned IMBAL_PCT = 10,   // equalization threshold, percent
  parameter int unsigned RES_DEGC  = 400,  // resistor temperature ...
  parameter int unsigned TJ_DEGC   = 90,   // ... equivalent to this on the IGBTs
  parameter int unsigned SCORE_W   = 20
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            strobe,
  input  logic [N_UNITS-1:0]              avail,
  input  logic [N_UNITS-1:0][VDC_W-1:0]   vdc,
  input  logic [N_UNITS-1:0][TEMP_W-1:0]  tj_igbt,
  input  logic [N_UNITS-1:0][TEMP_W-1:0]  t_res,
  input  logic [N_UNITS-1:0][HIST_W-1:0]  hist,
  input  logic [7:0]                      kc,
  output logic                            valid,
  output logic signed [N_UNITS-1:0][SCORE_W-1:0] dev,
  output logic        [N_UNITS-1:0][SCORE_W-1:0] pen,
  output logic        [2*VDC_W-1:0]       avg,
  output logic                            imbal
);

  localparam int unsigned E_W = 2 * VDC_W;

  logic [N_UNITS-1:0][E_W-1:0] e;
  logic [E_W+1:0]              sum;
  logic [E_W-1:0]              avg_c;
  logic [2:0]                  navail;
  logic signed [N_UNITS-1:0][SCORE_W-1:0] dev_c;
  logic        [N_UNITS-1:0][SCORE_W-1:0] pen_c;
  logic                        imbal_c;

  always_comb begin
    sum    = '0;
    navail = popcount4(avail);
    for (int i = 0; i < N_UNITS; i++) begin
      e[i] = E_W'(vdc[i]) * E_W'(vdc[i]);
      if (avail[i]) sum = sum + (E_W+2)'(e[i]);
    end
    case (navail)
      3'd1:    avg_c = E_W'(sum);
      3'd2:    avg_c = E_W'(sum >> 1);
      3'd3:    avg_c = E_W'(sum / 3);
      3'd4:    avg_c = E_W'(sum >> 2);
      default: avg_c = '0;
    endcase
    imbal_c = 1'b0;
    for (int i = 0; i < N_UNITS; i++) begin
      logic signed [E_W+1:0] d;
      logic        [E_W+1:0] dabs;
      logic [TEMP_W+3:0]     tres_eq, tjmax;
      logic [TEMP_W+12:0]    p;
      d       = signed'({2'b00, e[i]}) - signed'({2'b00, avg_c});
      dabs    = d[E_W+1] ? (E_W+2)'(-d) : (E_W+2)'(d);
      tres_eq = (TEMP_W+4)'((32'(t_res[i]) * TJ_DEGC) / RES_DEGC);
      tjmax   = ((TEMP_W+4)'(tj_igbt[i]) > tres_eq) ? (TEMP_W+4)'(tj_igbt[i]) : tres_eq;
      p       = ((TEMP_W+13)'(tjmax) + (TEMP_W+13)'(hist[i])) * (TEMP_W+13)'(kc);
      if (avail[i]) begin
        dev_c[i] = SCORE_W'(d >>> DEV_SHIFT);
        pen_c[i] = SCORE_W'(p >> 4);
        if ((E_W+16)'(dabs) * 100 > (E_W+16)'(avg_c) * IMBAL_PCT) imbal_c = 1'b1;
      end else begin
        dev_c[i] = '0;
        pen_c[i] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      dev   <= '0;
      pen   <= '0;
      avg   <= '0;
      imbal <= 1'b0;
    end else begin
      valid <= strobe;
      if (strobe) begin
        dev   <= dev_c;
        pen   <= pen_c;
        avg   <= avg_c;
        imbal <= imbal_c;
      end
    end
  end

endmodule
