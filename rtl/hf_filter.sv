// hf_filter: high-frequency transition filter.
//
// Protects the IGBTs against overheating by keeping the switching frequency
// below 10 kHz: if two reference transitions arrive less than MIN_GAP_US
// (40 us) apart, the second is passed on and every further reference change
// is ignored for HOLD_US (100 us). When the hold ends the output takes the
// present input. Timing uses the 1 us tick, so intervals are resolved to
// one microsecond. The 40 us and 100 us values are from the amplifier
// control; passing the second transition and catching up at the end of the
// hold are this design's reading. hold_start pulses when a hold begins.
module hf_filter
  import erfa_pkg::*;
#(
  parameter int unsigned MIN_GAP_US = 40,
  parameter int unsigned HOLD_US    = 100
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tick_us,
  input  level_t lvl_in,
  output level_t lvl_out,
  output logic   holding,
  output logic   hold_start
);

  localparam int unsigned GW = $clog2(MIN_GAP_US + 2);
  localparam int unsigned HW = $clog2(HOLD_US + 1);

  logic [GW-1:0] since_q;   // microseconds since the last passed transition
  logic [HW-1:0] hold_q;    // microseconds of hold left

  assign holding = (hold_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lvl_out    <= '0;
      since_q    <= GW'(MIN_GAP_US);
      hold_q     <= '0;
      hold_start <= 1'b0;
    end else begin
      hold_start <= 1'b0;
      if (tick_us) begin
        if (since_q < GW'(MIN_GAP_US)) since_q <= since_q + 1'b1;
        if (hold_q != '0)              hold_q  <= hold_q - 1'b1;
      end
      if (!holding && lvl_in != lvl_out) begin
        lvl_out <= lvl_in;
        since_q <= '0;
        if (since_q < GW'(MIN_GAP_US)) begin
          hold_q     <= HW'(HOLD_US);
          hold_start <= 1'b1;
        end
      end
    end
  end

endmodule
