// unit_switch_out: unit command register.
//
// Applies the switching vector stored for the selected level to the four
// unit inverters. The vector is registered (one clock from the memory read)
// and any unit that is not available is forced to 0 V and its output bypass
// is commanded closed, so that the pulse can continue with the remaining
// units. sw_event marks, per unit, a change of command (input to the
// switching history). Bypassing a failed unit follows the amplifier
// description; the register and the forcing are this design's choice.
module unit_switch_out
  import erfa_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  vector_t            vec_in,
  input  logic [N_UNITS-1:0] avail,
  output vector_t            unit_cmd,
  output logic [N_UNITS-1:0] bypass,
  output logic [N_UNITS-1:0] sw_event,
  output level_t             level
);

  vector_t nxt;

  always_comb begin
    for (int i = 0; i < N_UNITS; i++) nxt[i] = avail[i] ? vec_in[i] : U_ZERO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unit_cmd <= '{default: U_ZERO};
      bypass   <= '0;
      sw_event <= '0;
    end else begin
      unit_cmd <= nxt;
      bypass   <= ~avail;
      for (int i = 0; i < N_UNITS; i++) sw_event[i] <= (nxt[i] != unit_cmd[i]);
    end
  end

  assign level = vector_level(unit_cmd);

  // Rule of the inverter: one vector never mixes +3 kV and -3 kV
  property no_mixed_polarity;
    @(posedge clk) disable iff (!rst_n)
      !((unit_cmd[0] == U_POS || unit_cmd[1] == U_POS || unit_cmd[2] == U_POS || unit_cmd[3] == U_POS) &&
        (unit_cmd[0] == U_NEG || unit_cmd[1] == U_NEG || unit_cmd[2] == U_NEG || unit_cmd[3] == U_NEG));
  endproperty
  assert property (no_mixed_polarity);

endmodule
