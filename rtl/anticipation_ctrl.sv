// anticipation_ctrl: anticipation of a new voltage reference.
//
// On every even control interruption, once the unit energies are evaluated
// (start), this block computes the switching vector for each of the nine
// possible output levels and writes it into the vector memory, one level per
// clock cycle from -4 to +4 (busy during the 9 cycles, done pulses after
// the last write). Each vector is computed from the live present unit outputs,
// so an entry always describes a single step from the vector actually applied.
// Nine vectors per even interruption follow the amplifier control; the
// sequential write is this design's choice.
module anticipation_ctrl
  import erfa_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  vector_t            present,
  input  logic [N_UNITS-1:0] avail,
  input  logic               cur_neg,
  input  order_t             order_del,
  input  order_t             order_rec,
  output logic               we,
  output logic [3:0]         waddr,
  output vector_t            wdata,
  output logic               busy,
  output logic               done
);

  logic [3:0] idx_q;
  level_t     target;

  assign target = level_t'(signed'(idx_q) - 4'sd4);

  vector_gen u_gen (
    .target   (target),
    .present  (present),
    .avail    (avail),
    .cur_neg  (cur_neg),
    .order_del(order_del),
    .order_rec(order_rec),
    .vec      (wdata)
  );

  assign we    = busy;
  assign waddr = idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          idx_q <= '0;
        end
      end else if (idx_q == 4'(N_LEVELS - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        idx_q <= idx_q + 1'b1;
      end
    end
  end

endmodule
