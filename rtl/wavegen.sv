// wavegen: internal digital waveform generator (pre-programmed scenarios).
//
// Produces the current reference for the current-amplifier test mode. A
// scenario is a list of up to N_SEG segments, each a duration in
// microseconds and a slope in amperes per microsecond (signed Q8.8); the
// reference starts at zero on start and changes by the slope every
// microsecond of each segment in turn. A segment of zero duration, or the
// last entry, ends the scenario; the reference then holds its value and
// running falls (done pulses once). The segment table is written through a
// simple write port (we, addr, dur, slope) while the generator is idle; it
// is not cleared by reset, so a scenario must be written before the first
// start.
// That pre-programmed scenarios exist follows the amplifier description;
// the segment format is this design's choice. The reference is limited to
// the signed I_W-bit range.
module wavegen #(
  parameter int unsigned N_SEG = 16,
  parameter int unsigned I_W   = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     tick_us,
  input  logic                     we,
  input  logic [$clog2(N_SEG)-1:0] addr,
  input  logic [15:0]              dur,      // microseconds
  input  logic signed [15:0]       slope,    // amperes per microsecond, Q8.8
  input  logic                     start,
  output logic signed [I_W-1:0]    i_ref,
  output logic                     running,
  output logic                     done
);

  localparam int unsigned SW = $clog2(N_SEG);
  localparam int AW = I_W + 9;
  localparam logic signed [AW-1:0] ACC_MAX = AW'((2 ** (I_W - 1) - 1)) <<< 8;

  typedef struct packed {
    logic [15:0]        dur;
    logic signed [15:0] slope;
  } segment_t;

  segment_t             seg_mem [N_SEG];
  logic [SW-1:0]        seg_q;
  logic [15:0]          left_q;
  logic signed [AW-1:0] acc_q, acc_n;
  logic signed [15:0]   cur_slope;

  assign cur_slope = seg_mem[seg_q].slope;
  assign i_ref = I_W'(acc_q >>> 8);

  always_ff @(posedge clk) begin
    if (we && !running) seg_mem[addr] <= '{dur: dur, slope: slope};
  end

  always_comb begin
    acc_n = acc_q + AW'(cur_slope);
    if (acc_n > ACC_MAX)  acc_n = ACC_MAX;
    if (acc_n < -ACC_MAX) acc_n = -ACC_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      seg_q   <= '0;
      left_q  <= '0;
      acc_q   <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start && seg_mem[0].dur == '0) begin
          done    <= 1'b1;          // empty scenario
          acc_q   <= '0;
        end else if (start) begin
          running <= 1'b1;
          seg_q   <= '0;
          left_q  <= seg_mem[0].dur;
          acc_q   <= '0;
        end
      end else if (left_q == '0) begin
        // segment finished: next one, or end of scenario
        if (seg_q == SW'(N_SEG - 1) || seg_mem[seg_q + 1'b1].dur == '0) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          seg_q  <= seg_q + 1'b1;
          left_q <= seg_mem[seg_q + 1'b1].dur;
        end
      end else if (tick_us) begin
        acc_q  <= acc_n;
        left_q <= left_q - 1'b1;
      end
    end
  end

endmodule
