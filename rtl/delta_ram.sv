// delta_ram: path-score store closing the Viterbi feedback loop.
//
// Holds the unscaled score delta_t(j) of every state between observations.
// The HMM block writes delta_t(j) through the write port; the next frame reads
// it back as delta_{t-1}(j) through the read port. Simple dual port, read
// synchronous (data one cycle after raddr); a read of the address being
// written in the same cycle returns the old value. The original design shows
// only the feedback path; holding it in a RAM is this design's choice.
module delta_ram
  import viterbi_pkg::*;
#(
  parameter int unsigned NS  = N_STATES,
  parameter int unsigned SAW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic           clk,
  input  logic           we,
  input  logic [SAW-1:0] waddr,
  input  cost_t          wdata,
  input  logic [SAW-1:0] raddr,
  output cost_t          rdata
);

  cost_t mem [NS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
