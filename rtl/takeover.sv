// takeover: internal control takeover on output current limits.
//
// When the output current approaches its limit the internal control takes
// over any external reference to keep the current within tolerance and avoid
// a trip. Two adjustable thresholds are used:
//   |I| >= th_zero : TO_ZERO    - a reference that would drive the current
//                                 further (same sign as the current) is
//                                 replaced by 0 V; others pass;
//   |I| >= th_rev  : TO_REVERSE - the output is set to the full range of the
//                                 polarity opposite to the current.
// The takeover steps back (REVERSE to ZERO, ZERO to NONE) when |I| falls
// below the threshold minus the adjustable decrement dec. Thresholds and
// decrement are given for four units and are scaled by navail/4, so the
// limits decrease when units are bypassed. The two actions, the adjustable
// threshold and decrement and the reduction with bypassed units follow the
// amplifier control; the two-threshold state machine and the linear scaling
// are this design's choice. State is registered, the level output is
// combinational from state and inputs. to_event pulses on entering a takeover.
module takeover
  import erfa_pkg::*;
#(
  parameter int unsigned I_W = 14          // current width, amperes, signed
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [I_W-1:0] i_out,
  input  logic        [I_W-2:0] th_zero,
  input  logic        [I_W-2:0] th_rev,
  input  logic        [I_W-2:0] dec,
  input  logic [2:0]            navail,
  input  level_t                lvl_in,
  output level_t                lvl_out,
  output takeover_t             state,
  output logic                  to_event
);

  logic [I_W-1:0]   iabs;
  logic [I_W+2:0]   thz, thr, relz, relr;
  logic             ineg;
  takeover_t        nxt;

  always_comb begin
    ineg = i_out[I_W-1];
    iabs = ineg ? I_W'(-i_out) : I_W'(i_out);
    thz  = ((I_W+3)'(th_zero) * (I_W+3)'(navail)) >> 2;
    thr  = ((I_W+3)'(th_rev)  * (I_W+3)'(navail)) >> 2;
    relz = (thz > (I_W+3)'(dec)) ? thz - (I_W+3)'(dec) : '0;
    relr = (thr > (I_W+3)'(dec)) ? thr - (I_W+3)'(dec) : '0;
    nxt  = state;
    unique case (state)
      TO_NONE:    if ((I_W+3)'(iabs) >= thr)      nxt = TO_REVERSE;
                  else if ((I_W+3)'(iabs) >= thz) nxt = TO_ZERO;
      TO_ZERO:    if ((I_W+3)'(iabs) >= thr)      nxt = TO_REVERSE;
                  else if ((I_W+3)'(iabs) < relz) nxt = TO_NONE;
      TO_REVERSE: if ((I_W+3)'(iabs) < relr)      nxt = TO_ZERO;
      default:    nxt = TO_NONE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= TO_NONE;
      to_event <= 1'b0;
    end else begin
      state    <= nxt;
      to_event <= (state == TO_NONE) && (nxt != TO_NONE);
    end
  end

  always_comb begin
    unique case (state)
      TO_ZERO: begin
        // a level of the current's sign would increase |I|
        if (lvl_in != 0 && (lvl_in[3] == ineg)) lvl_out = '0;
        else                                    lvl_out = lvl_in;
      end
      TO_REVERSE: lvl_out = ineg ? level_t'(navail) : -level_t'(navail);
      default:    lvl_out = lvl_in;
    endcase
  end

endmodule
