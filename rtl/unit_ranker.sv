// unit_ranker: switching-priority ranking of the units for one energy role.
//
// A unit applying a voltage of the same sign as the output current delivers
// DC-link energy to the load; one of opposite sign recovers energy. For the
// delivering role a unit is the more suitable the more energy it holds above
// the average; for the recovering role, the less. In both roles a hot unit,
// or one that switched recently, is less suitable. The priority is
//   deliver:  dev - pen        recover:  -dev - pen
// and the output order lists the unit indices from highest to lowest
// priority (ties go to the lower index). Unavailable units rank last.
// Ranking by merged unit energy follows the amplifier description; the
// two-role priority formula is this design's reading of it. Combinational.
module unit_ranker
  import erfa_pkg::*;
#(
  parameter int unsigned SCORE_W = 20
) (
  input  logic                                   deliver,  // 1: delivering role
  input  logic [N_UNITS-1:0]                     avail,
  input  logic signed [N_UNITS-1:0][SCORE_W-1:0] dev,
  input  logic        [N_UNITS-1:0][SCORE_W-1:0] pen,
  output order_t                                 order
);

  logic signed [SCORE_W+1:0] prio [N_UNITS];
  logic        [N_UNITS-1:0][1:0]         rank;

  always_comb begin
    for (int i = 0; i < N_UNITS; i++) begin
      logic signed [SCORE_W+1:0] d, p;
      d = (SCORE_W+2)'(signed'(dev[i]));
      p = signed'({2'b00, pen[i]});
      if (!avail[i])
        prio[i] = {2'b10, {SCORE_W{1'b0}}};   // most negative value
      else if (deliver)
        prio[i] = d - p;
      else
        prio[i] = -d - p;
    end
    for (int i = 0; i < N_UNITS; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N_UNITS; j++)
        if (j != i && ((prio[j] > prio[i]) || (prio[j] == prio[i] && j < i)))
          rank[i] = rank[i] + 1'b1;
    end
    order = '0;
    for (int i = 0; i < N_UNITS; i++) order[rank[i]] = unit_idx_t'(i);
  end

endmodule
