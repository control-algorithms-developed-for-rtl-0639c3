// vector_gen: switching vector for one target output level.
//
// Given the present unit outputs, the current sign, the available units and
// the two priority rankings (delivering and recovering role), it returns the
// vector that produces the target level. Rules from the amplifier control:
// a vector for a positive level uses only +3 kV and 0 V, one for a negative
// level only -3 kV and 0 V; only available units are used. The role of the
// switched units follows from the level sign and the current sign (same sign:
// delivering). This design's own choice is how the three inputs are combined,
// so that a single reference change switches as few units as possible:
//   * same polarity as now, larger magnitude: keep the active units and add
//     the best-ranked idle ones;
//   * same polarity, smaller magnitude: switch off the worst-ranked active
//     units;
//   * level 0, or polarity reversal: choose the best-ranked units afresh.
// A target beyond the number of available units is clamped. Combinational.
module vector_gen
  import erfa_pkg::*;
(
  input  level_t             target,
  input  vector_t            present,
  input  logic [N_UNITS-1:0] avail,
  input  logic               cur_neg,     // output current is negative
  input  order_t             order_del,   // ranking, delivering role
  input  order_t             order_rec,   // ranking, recovering role
  output vector_t            vec
);

  always_comb begin
    logic        pos;        // target polarity is positive
    logic [2:0]  k;          // target magnitude, clamped
    logic [2:0]  n;          // present magnitude in the target polarity
    logic [2:0]  navail;
    logic [2:0]  cnt;
    unit_state_t st;
    order_t      ord;
    logic [N_UNITS-1:0] act;

    pos    = !target[3];
    k      = target[3] ? 3'(-target) : 3'(target);
    navail = popcount4(avail);
    if (k > navail) k = navail;
    st     = pos ? U_POS : U_NEG;
    ord    = (pos != cur_neg) ? order_del : order_rec;

    // active units already in the target polarity
    for (int i = 0; i < N_UNITS; i++) act[i] = avail[i] && (present[i] == st);
    n = popcount4(act);
    // a vector with the other polarity present cannot be kept: restart
    for (int i = 0; i < N_UNITS; i++)
      if (avail[i] && present[i] != U_ZERO && present[i] != st) begin
        act = '0;
        n   = '0;
      end

    vec = '{default: U_ZERO};
    cnt = '0;
    if (k != 0) begin
      if (k >= n) begin
        for (int i = 0; i < N_UNITS; i++) if (act[i]) vec[i] = st;
        cnt = n;
        for (int r = 0; r < N_UNITS; r++)
          if (cnt < k && avail[ord[r]] && !act[ord[r]]) begin
            vec[ord[r]] = st;
            cnt = cnt + 1'b1;
          end
      end else begin
        for (int i = 0; i < N_UNITS; i++) if (act[i]) vec[i] = st;
        cnt = n;
        for (int r = N_UNITS - 1; r >= 0; r--)
          if (cnt > k && act[ord[r]]) begin
            vec[ord[r]] = U_ZERO;
            cnt = cnt - 1'b1;
          end
      end
    end
  end

endmodule
