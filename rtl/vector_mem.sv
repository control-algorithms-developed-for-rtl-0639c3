// vector_mem: memory of the nine precomputed switching vectors.
//
// One entry per output level (-4..+4, addressed as level+4). The
// anticipation process fills it; the equalization process may rewrite the
// entry of the present level. The read port is asynchronous so that a
// reference change is turned into unit commands in the next clock cycle. It
// is cleared at reset (all units at 0 V until the first anticipation).
// Having the vectors in an FPGA memory follows the amplifier control; the
// single write port and the reset are this design's choice.
module vector_mem
  import erfa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [3:0]  waddr,
  input  vector_t     wdata,
  input  logic [3:0]  raddr,
  output vector_t     rdata
);

  vector_t mem [N_LEVELS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_LEVELS; i++) mem[i] <= '{default: U_ZERO};
    end else if (we && waddr < 4'(N_LEVELS)) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (raddr < 4'(N_LEVELS)) ? mem[raddr] : '{default: U_ZERO};

endmodule
