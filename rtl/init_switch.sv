// init_switch: source selector at the head of the Viterbi recursion.
//
// For the first observation of an utterance (init = 1) there is no previous
// path score, so the switch forms the start scores itself: the first emitting
// state of every model starts with its observation cost, delta_0(j) = b_j(O_0),
// and every other state starts at COST_INF (probability zero). For every later
// observation it forwards the unscaled score delta_{t-1}(j) fed back from the
// delta store. The observation cost is passed on towards the HMM block.
// Purely combinational.
//
// Starting only in the first state of each model is this design's choice.
module init_switch
  import viterbi_pkg::*;
(
  input  logic  init,       // first observation of the utterance
  input  logic  is_entry,   // state j is the first emitting state of its model
  input  cost_t b_in,       // b_j(O_t)
  input  cost_t delta_fb,   // delta_{t-1}(j) from the feedback store
  output cost_t delta_out,  // delta_{t-1}(j), unscaled
  output cost_t b_out       // b_j(O_t) for the HMM block
);

  always_comb begin
    if (init) delta_out = is_entry ? b_in : COST_INF;
    else      delta_out = delta_fb;
    b_out = b_in;
  end

endmodule
