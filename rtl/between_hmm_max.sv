// between_hmm_max: finds the most probable way of leaving any model.
//
// With no language model, any model may follow any other. The score for
// leaving model m is delta_{t-1}(last state of m) + exit_m, where exit_m is the
// model's exit-transition cost read from the between-HMM cost memory. During
// the same scan pass as the scaler (scan_start, scan_valid per state with
// scan_is_exit marking last states, scan_done) this unit keeps the smallest
// such cost and the state it came from. On scan_done both are latched to
// best_cost/best_state for use in the next update pass; best_state becomes the
// predecessor of any model entry that takes the between-HMM path.
// clear sets best_cost to COST_INF.
//
// The argmin is reported as the index of the last state of the winning model.
// A shared best exit for all model entries follows from the original
// system having no language model; treating the between-HMM probability as
// one exit cost per model is this design's reading.
module between_hmm_max
  import viterbi_pkg::*;
#(
  parameter int unsigned NS  = N_STATES,
  parameter int unsigned SAW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           scan_start,
  input  logic           scan_valid,
  input  logic           scan_is_exit,
  input  cost_t          scan_delta,
  input  logic [SAW-1:0] scan_state,
  input  tp_t            exit_cost,
  input  logic           scan_done,
  output cost_t          best_cost,
  output logic [SAW-1:0] best_state
);

  cost_t          run_cost;
  logic [SAW-1:0] run_state;
  cost_t          cand;

  assign cand = cost_add(scan_delta, tp_to_cost(exit_cost));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_cost   <= COST_INF;
      run_state  <= '0;
      best_cost  <= COST_INF;
      best_state <= '0;
    end else begin
      if (scan_start) begin
        run_cost  <= COST_INF;
        run_state <= '0;
      end else if (scan_valid && scan_is_exit && cand < run_cost) begin
        run_cost  <= cand;
        run_state <= scan_state;
      end
      if (clear) begin
        best_cost  <= COST_INF;
        best_state <= '0;
      end else if (scan_done) begin
        best_cost  <= run_cost;
        best_state <= run_state;
      end
    end
  end

endmodule
