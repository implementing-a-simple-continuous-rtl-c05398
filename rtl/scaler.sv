// scaler: keeps path scores in range by removing the best score each frame.
//
// During a scan pass (scan_start, then one scan_valid per state, then
// scan_done) the scaler finds min_j delta(j) over all states and its state
// index. On scan_done the minimum is latched into min_out/min_state, where it
// stays for the whole next update pass. The combinational port in_delta ->
// out_scaled subtracts min_out, so the best path enters the next step with
// score 0 and no score grows without bound. COST_INF is left unchanged.
// clear sets min_out to 0 (an identity scaling) at the start of an utterance.
//
// Timing: min_out changes on the clock edge that samples scan_done.
//
// Scaling by the minimum score follows the original decoder; doing it with a
// separate scan pass and the tie rule (lowest index wins) are this design's.
module scaler
  import viterbi_pkg::*;
#(
  parameter int unsigned NS   = N_STATES,
  parameter int unsigned SAW  = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           scan_start,
  input  logic           scan_valid,
  input  cost_t          scan_delta,
  input  logic [SAW-1:0] scan_state,
  input  logic           scan_done,
  output cost_t          min_out,
  output logic [SAW-1:0] min_state,
  input  cost_t          in_delta,
  output cost_t          out_scaled
);

  cost_t          run_min;
  logic [SAW-1:0] run_state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_min   <= COST_INF;
      run_state <= '0;
      min_out   <= '0;
      min_state <= '0;
    end else begin
      if (scan_start) begin
        run_min   <= COST_INF;
        run_state <= '0;
      end else if (scan_valid && scan_delta < run_min) begin
        run_min   <= scan_delta;
        run_state <= scan_state;
      end
      if (clear) begin
        min_out   <= '0;
        min_state <= '0;
      end else if (scan_done) begin
        min_out   <= run_min;
        min_state <= run_state;
      end
    end
  end

  assign out_scaled = cost_scale(in_delta, min_out);

endmodule
