// between_hmm_scale: brings the between-HMM score onto the scaled range.
//
// The best model-exit cost is computed from unscaled scores, while the HMM
// block works on scores from which the scaler has removed the frame minimum.
// This unit subtracts that same minimum so the entry path into each model's
// first state is comparable with the in-model paths. When no model can be left
// the score stays COST_INF. Combinational. The unit is part of the original
// data path; subtracting exactly the frame minimum is this design's reading.
module between_hmm_scale
  import viterbi_pkg::*;
(
  input  cost_t best_cost,   // min over models of delta(last) + exit cost
  input  cost_t frame_min,   // min over all states, from the scaler
  output cost_t scaled_cost
);

  assign scaled_cost = cost_scale(best_cost, frame_min);

endmodule
