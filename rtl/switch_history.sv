// switch_history: recent-switching record of each unit.
//
// The unit energy evaluation penalizes the units that switched last. This
// block keeps, per unit, a recency value: it is loaded with HIST_MAX when
// the unit's output changes (sw_event) and decays by one at every control
// interruption (irq), so a unit that has just switched carries the largest
// penalty and the penalty fades over HIST_MAX interruptions. That a penalty
// exists follows the amplifier description; its form (load-and-decay) and
// size are this design's choice. Outputs are registered.
module switch_history
  import erfa_pkg::*;
#(
  parameter int unsigned HIST_W   = 4,
  parameter int unsigned HIST_MAX = 15
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         irq,        // decay strobe
  input  logic [N_UNITS-1:0]           sw_event,   // unit i changed its output
  output logic [N_UNITS-1:0][HIST_W-1:0] hist
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist <= '0;
    end else begin
      for (int i = 0; i < N_UNITS; i++) begin
        if (sw_event[i])
          hist[i] <= HIST_W'(HIST_MAX);
        else if (irq && hist[i] != '0)
          hist[i] <= hist[i] - 1'b1;
      end
    end
  end

endmodule
