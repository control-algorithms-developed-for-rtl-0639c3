// erfa_timebase: microsecond tick and the periodic control interruption.
//
// The inverter control runs its processes on a fixed interruption, one every
// 50 us, and alternates between two of them: on even interruptions the
// anticipation of a new reference, on odd ones the DC-link equalization. This
// block divides the system clock into a one-cycle pulse every microsecond
// (tick_us) and, every IRQ_US ticks, a one-cycle interruption pulse (irq) with
// its parity (irq_odd, valid with irq). The first interruption after reset is
// number 0 (even). The 50 us period is from the amplifier description; the
// clock frequency (CLK_PER_US) is this design's assumption.
module erfa_timebase #(
  parameter int unsigned CLK_PER_US = 40,   // system clock cycles per microsecond
  parameter int unsigned IRQ_US     = 50    // interruption period in microseconds
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick_us,   // one-cycle pulse every microsecond
  output logic irq,       // one-cycle pulse every IRQ_US microseconds
  output logic irq_odd    // parity of the interruption number, valid with irq
);

  logic [$clog2(CLK_PER_US+1)-1:0] div_q;
  logic [$clog2(IRQ_US+1)-1:0]     us_q;
  logic                            par_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q   <= '0;
      us_q    <= '0;
      par_q   <= 1'b1;   // first interruption toggles to even
      tick_us <= 1'b0;
      irq     <= 1'b0;
    end else begin
      tick_us <= 1'b0;
      irq     <= 1'b0;
      if (div_q == $bits(div_q)'(CLK_PER_US - 1)) begin
        div_q   <= '0;
        tick_us <= 1'b1;
        if (us_q == $bits(us_q)'(IRQ_US - 1)) begin
          us_q  <= '0;
          irq   <= 1'b1;
          par_q <= ~par_q;
        end else begin
          us_q <= us_q + 1'b1;
        end
      end else begin
        div_q <= div_q + 1'b1;
      end
    end
  end

  assign irq_odd = par_q;

endmodule
