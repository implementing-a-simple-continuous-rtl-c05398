// hmm_block: add-compare-select for one HMM state per cycle.
//
// For state j it evaluates the log-domain Viterbi step on scaled scores
//
//   stay  = delta'_{t-1}(j)   + a_self(j)
//   enter = delta'_{t-1}(j-1) + a_in(j)          (j not first in its model)
//         = between'          + a_in(j)          (j first in its model)
//   delta_t(j) = min(stay, enter) + b_j(O_t)
//   psi_t(j)   = j, j-1 or the between-HMM argmin, whichever won
//
// Models are left-to-right with a self loop on each state. States are fed
// in index order; the block keeps the previous state's scaled score in a
// register, so state j-1's old score is available even though the delta store
// has already been overwritten. Ties keep the self loop.
//
// In init mode (first observation) the incoming score is already delta_0(j),
// formed by the init switch; it is passed through and no predecessor is
// produced (out_psi_valid = 0).
//
// Timing: one state per in_valid cycle; outputs are registered, so
// out_valid/out_delta/out_psi appear one cycle after in_valid.
//
// The log-domain recursion is the original decoder's; the left-to-right
// topology without skips, the tie rule and the one-state-per-cycle form are
// this design's choices.
module hmm_block
  import viterbi_pkg::*;
#(
  parameter int unsigned NS  = N_STATES,
  parameter int unsigned SAW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_init,
  input  logic           in_entry,      // first emitting state of a model
  input  logic [SAW-1:0] in_state,      // j
  input  cost_t          in_b,          // b_j(O_t)
  input  cost_t          in_delta,      // scaled delta_{t-1}(j)
  input  trans_t         in_trans,      // a_self(j), a_in(j)
  input  cost_t          between_cost,  // scaled best model-exit score
  input  logic [SAW-1:0] between_state, // its last state
  output logic           out_valid,
  output logic           out_psi_valid,
  output logic [SAW-1:0] out_state,
  output cost_t          out_delta,     // delta_t(j), unscaled
  output logic [SAW-1:0] out_psi        // psi_t(j)
);

  cost_t          prev_delta;   // scaled delta_{t-1}(j-1)
  cost_t          stay, from, enter, best;
  logic [SAW-1:0] from_state, best_state;

  always_comb begin
    stay       = cost_add(in_delta, tp_to_cost(in_trans.a_self));
    from       = in_entry ? between_cost : prev_delta;
    from_state = in_entry ? between_state : in_state - SAW'(1);
    enter      = cost_add(from, tp_to_cost(in_trans.a_in));
    if (enter < stay) begin
      best       = enter;
      best_state = from_state;
    end else begin
      best       = stay;
      best_state = in_state;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_delta    <= COST_INF;
      out_valid     <= 1'b0;
      out_psi_valid <= 1'b0;
      out_state     <= '0;
      out_delta     <= COST_INF;
      out_psi       <= '0;
    end else begin
      out_valid     <= in_valid;
      out_psi_valid <= in_valid && !in_init;
      if (in_valid) begin
        prev_delta <= in_delta;
        out_state  <= in_state;
        out_delta  <= in_init ? in_delta : cost_add(best, in_b);
        out_psi    <= in_init ? in_state : best_state;
      end
    end
  end

endmodule
