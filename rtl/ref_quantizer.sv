// ref_quantizer: analogue voltage demand to the nine-state level.
//
// The amplifier accepts its voltage demand as an analogue signal and turns it
// into the nine-state digital demand with an adjustable hysteresis, to avoid
// excessive switching between levels. Here the digitised demand (volts,
// signed) is compared with the centre of the present level; the level moves
// to the nearest one only when the demand leaves the band
// centre +/- (STEP_V/2 + hyst). The nearest level is found by comparing the
// demand with the half-step thresholds and is limited to -4..+4. The level
// is registered and updated every clock cycle. The hysteresis band form is
// this design's choice; the amplifier description only says it is adjustable.
module ref_quantizer
  import erfa_pkg::*;
#(
  parameter int unsigned DEM_W = 16,      // demand width, volts, signed
  parameter int unsigned HYS_W = 12       // hysteresis width, volts
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DEM_W-1:0] demand,
  input  logic        [HYS_W-1:0] hyst,
  output level_t                  level
);

  localparam int HALF = STEP_V / 2;

  level_t                 nearest;
  logic signed [DEM_W+1:0] centre, err, band;
  logic                   move;

  always_comb begin
    nearest = '0;
    for (int k = 1; k <= MAX_LEVEL; k++) begin
      if (32'(signed'(demand)) >=  (k * int'(STEP_V) - HALF)) nearest = nearest + 4'sd1;
      if (32'(signed'(demand)) <= -(k * int'(STEP_V) - HALF)) nearest = nearest - 4'sd1;
    end
    centre = (DEM_W+2)'(32'(signed'(level)) * int'(STEP_V));
    err    = (DEM_W+2)'(demand) - centre;
    band   = (DEM_W+2)'(HALF) + signed'({2'b00, (DEM_W)'(hyst)});
    move   = (err > band) || (err < -band);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    level <= '0;
    else if (move) level <= nearest;
  end

endmodule
