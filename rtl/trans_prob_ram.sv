// trans_prob_ram: transition-cost memory, one word per HMM state.
//
// Word j holds {a_self(j), a_in(j)}: the cost of the self loop on state j and
// the cost of entering j (from j-1 inside a model, or from the between-HMM
// path for a model's first state). Written by the host through the write
// port before decoding; read synchronously (data one cycle after raddr),
// which maps onto FPGA block RAM, where the original design kept its
// transition probabilities. The word layout is this design's choice.
module trans_prob_ram
  import viterbi_pkg::*;
#(
  parameter int unsigned NS  = N_STATES,
  parameter int unsigned SAW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic           clk,
  input  logic           we,
  input  logic [SAW-1:0] waddr,
  input  trans_t         wdata,
  input  logic [SAW-1:0] raddr,
  output trans_t         rdata
);

  trans_t mem [NS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
