// equalizer: equalization of the DC-link energies.
//
// On every odd control interruption, once the unit energies are evaluated
// (start), and if some unit's energy differs from the average by more than
// 10 % (imbal), this block looks for another vector with the same output
// level that moves the energies toward the average: the worst-ranked active
// unit and the best-ranked idle available unit exchange places (for a
// delivering role: the active unit with least energy stops and the idle one
// with most energy takes over). The new vector is written into the vector
// memory entry of the present level, so the units rotate with no reference
// change. A swap is only made when the level is not 0, an idle available unit
// exists, the exchange improves the ranking and no reference transition is in
// progress (allow). swap pulses for one cycle with the write. The trigger and
// the 10 % rule follow the amplifier control; the exact "certain conditions"
// are this design's choice.
module equalizer
  import erfa_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               imbal,
  input  logic               allow,
  input  vector_t            present,
  input  logic [N_UNITS-1:0] avail,
  input  logic               cur_neg,
  input  order_t             order_del,
  input  order_t             order_rec,
  output logic               we,
  output logic [3:0]         waddr,
  output vector_t            wdata,
  output logic               swap
);

  level_t             lvl;
  logic               pos;
  unit_state_t        st;
  order_t             ord;
  logic               found_in, found_out;
  logic [2:0]         pos_in, pos_out;
  unit_idx_t          u_in, u_out;
  vector_t            nv;
  logic               ok;

  always_comb begin
    lvl = vector_level(present);
    pos = !lvl[3];
    st  = pos ? U_POS : U_NEG;
    ord = (pos != cur_neg) ? order_del : order_rec;
    found_in  = 1'b0;
    found_out = 1'b0;
    pos_in    = '0;
    pos_out   = '0;
    u_in      = '0;
    u_out     = '0;
    // best idle available unit: first in the ranking
    for (int r = N_UNITS - 1; r >= 0; r--)
      if (avail[ord[r]] && present[ord[r]] == U_ZERO) begin
        found_in = 1'b1;
        u_in     = ord[r];
        pos_in   = 3'(r);
      end
    // worst active unit: last in the ranking
    for (int r = 0; r < N_UNITS; r++)
      if (avail[ord[r]] && present[ord[r]] == st) begin
        found_out = 1'b1;
        u_out     = ord[r];
        pos_out   = 3'(r);
      end
    nv = present;
    nv[u_in]  = st;
    nv[u_out] = U_ZERO;
    ok = start && imbal && allow && (lvl != 0) && found_in && found_out &&
         (pos_in < pos_out);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we    <= 1'b0;
      waddr <= '0;
      wdata <= '{default: U_ZERO};
      swap  <= 1'b0;
    end else begin
      we    <= ok;
      swap  <= ok;
      if (ok) begin
        waddr <= level_addr(lvl);
        wdata <= nv;
      end
    end
  end

endmodule
