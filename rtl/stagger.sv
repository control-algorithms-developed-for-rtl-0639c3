// stagger: staggered switching toward full output voltage.
//
// To reduce output overshoot and dV/dt on the coils, +12 kV (-12 kV) is never
// applied in one step: when the requested level is +4 (-4) and the applied
// level is not already +3 or +4 (-3 or -4), the level +3 (-3) is applied
// first for STAGGER_US (about 100 us) and only then the full level. If the
// request changes during the intermediate stage, the stage is abandoned and
// the new request is handled from the next cycle. All other requests pass
// with one cycle of delay. The +/-9 kV stage and its 100 us length follow the
// amplifier control. active is high during the intermediate stage, stage_start
// pulses when one begins.
module stagger
  import erfa_pkg::*;
#(
  parameter int unsigned STAGGER_US = 100
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tick_us,
  input  level_t lvl_req,
  output level_t lvl_out,
  output logic   active,
  output logic   stage_start
);

  localparam int unsigned TW = $clog2(STAGGER_US + 1);

  logic [TW-1:0] t_q;
  level_t        tgt_q;
  logic          full, already;
  level_t        mid;

  always_comb begin
    full    = (lvl_req == 4'sd4) || (lvl_req == -4'sd4);
    mid     = lvl_req[3] ? -4'sd3 : 4'sd3;
    already = (lvl_out == lvl_req) || (lvl_out == mid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lvl_out     <= '0;
      active      <= 1'b0;
      t_q         <= '0;
      tgt_q       <= '0;
      stage_start <= 1'b0;
    end else begin
      stage_start <= 1'b0;
      if (!active) begin
        if (full && !already) begin
          lvl_out     <= mid;
          tgt_q       <= lvl_req;
          t_q         <= TW'(STAGGER_US);
          active      <= 1'b1;
          stage_start <= 1'b1;
        end else begin
          lvl_out <= lvl_req;
        end
      end else if (lvl_req != tgt_q) begin
        active <= 1'b0;
      end else if (tick_us) begin
        if (t_q <= TW'(1)) begin
          lvl_out <= tgt_q;
          active  <= 1'b0;
        end
        t_q <= t_q - 1'b1;
      end
    end
  end

endmodule
