// dclink_vref: DC-link voltage reference of one unit.
//
// The amplifier is an energy exchanger: energy taken from the DC-link
// capacitors is stored in the load inductance, so the DC-link voltage
// reference falls as the output current rises. From the energy balance
//     1/2 C (V0^2 - Vref^2) = 1/2 L I^2
// the reference is Vref = sqrt(V0^2 - (L/C) I^2), with V0 the DC-link
// voltage at zero output current. k_lc is L/C in unsigned Q8.8 (ohm^2); it is
// a setting, so it may also include the sharing of the load energy among the
// units. The radicand is floored at VMIN^2. The square root is computed bit
// by bit, one result bit per clock: a new computation starts on start (the
// inputs are sampled then) and vref is updated with a one-cycle valid pulse
// in the (VDC_W+2)-th cycle after the start cycle. The equation is the amplifier's; the number formats,
// the floor and the iterative root are this design's choice.
module dclink_vref #(
  parameter int unsigned VDC_W = 12,     // volts
  parameter int unsigned I_W   = 14,     // amperes, signed
  parameter int unsigned VMIN  = 1000    // lowest reference, volts
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [VDC_W-1:0]      v0,
  input  logic signed [I_W-1:0] i_out,
  input  logic [15:0]           k_lc,
  output logic [VDC_W-1:0]      vref,
  output logic                  valid,
  output logic                  busy
);

  localparam int unsigned R_W = 2 * VDC_W;          // radicand width
  localparam int unsigned T_W = 2 * I_W + 16;       // k_lc * I^2 width
  localparam int unsigned CW  = $clog2(VDC_W + 1);

  logic [R_W-1:0]  rad_q;      // radicand
  logic [VDC_W-1:0] root_q;
  logic [CW-1:0]    bit_q;
  logic [I_W-1:0]   iabs;
  logic [T_W-1:0]   term;
  logic [R_W-1:0]   v0sq, rad_c;

  always_comb begin
    iabs  = i_out[I_W-1] ? I_W'(-i_out) : I_W'(i_out);
    term  = (T_W'(iabs) * T_W'(iabs) * T_W'(k_lc)) >> 8;
    v0sq  = R_W'(v0) * R_W'(v0);
    if (T_W'(v0sq) <= term + T_W'(VMIN * VMIN) || v0 <= VDC_W'(VMIN))
      rad_c = R_W'(VMIN * VMIN);
    else
      rad_c = v0sq - R_W'(term);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad_q  <= '0;
      root_q <= '0;
      bit_q  <= '0;
      busy   <= 1'b0;
      valid  <= 1'b0;
      vref   <= '0;
    end else begin
      valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          rad_q  <= rad_c;
          root_q <= '0;
          bit_q  <= CW'(VDC_W);
          busy   <= 1'b1;
        end
      end else if (bit_q == '0) begin
        busy  <= 1'b0;
        valid <= 1'b1;
        vref  <= root_q;
      end else begin
        // try setting result bit (bit_q-1)
        logic [VDC_W-1:0] trial;
        trial = root_q | (VDC_W'(1) << (bit_q - 1'b1));
        if ((R_W)'(trial) * (R_W)'(trial) <= rad_q) root_q <= trial;
        bit_q <= bit_q - 1'b1;
      end
    end
  end

endmodule
