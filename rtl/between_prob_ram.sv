// between_prob_ram: exit-transition cost of each HMM (between-HMM costs).
//
// Entry m holds the cost of leaving model m from its last emitting state.
// Small and read combinationally (data in the same cycle as raddr), as FPGA
// distributed (LUT) RAM, as in the original design; written by the host
// through the write port. One 16-bit cost per model is this design's choice.
module between_prob_ram
  import viterbi_pkg::*;
#(
  parameter int unsigned NM  = N_MODELS,
  parameter int unsigned MAW = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic           clk,
  input  logic           we,
  input  logic [MAW-1:0] waddr,
  input  tp_t            wdata,
  input  logic [MAW-1:0] raddr,
  output tp_t            rdata
);

  tp_t mem [NM];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
