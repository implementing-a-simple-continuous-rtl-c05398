// obs_prob_unit: observation-cost engine for continuous HMM states.
//
// Computes, for one state j at a time, the negative log of a diagonal-
// covariance Gaussian density evaluated at the current observation O_t:
//
//   b_j = gconst_j + sum_{i=0}^{L-1} (O_i - mu_ji)^2 * ivar_ji
//
// where gconst_j = (L/2) ln(2 pi) + sum_i ln(sigma_ji) and
// ivar_ji = 1/(2 sigma_ji^2) are precomputed per state by the host. All
// arithmetic is IEEE-754 single precision (round to nearest even, subnormals
// flushed to zero), summing in the order gconst, term 0, term 1, ...; the
// final sum is converted to the decoder's fixed-point cost (rounded down,
// negative sums clamp to 0, so the host should keep gconst large enough,
// e.g. by adding a common offset that the decoder's scaling removes).
//
// The observation vector is held in a small register file, written through
// obs_we/obs_waddr/obs_wdata before a frame starts. Model parameters stream
// in one dimension per cycle (in_valid, in_dim, mean, ivar); in_first marks
// dimension 0 of a state, in_last dimension L-1; gconst is used with
// in_first. The unit is a 4-stage pipeline (subtract, square, scale by ivar,
// accumulate) that accepts a new dimension every cycle with no bubble between
// states, so a state costs exactly L cycles. b_valid pulses 4 cycles after
// the in_last cycle of a state.
//
// Evaluating the Gaussians on chip in single precision follows the original
// system; the precomputed constants, summation order, pipeline and
// cost conversion are this design's choices.
module obs_prob_unit
  import viterbi_pkg::*;
#(
  parameter int unsigned DIM    = FEAT_DIM,
  parameter int unsigned DIM_AW = (DIM > 1) ? $clog2(DIM) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // observation register file load
  input  logic              obs_we,
  input  logic [DIM_AW-1:0] obs_waddr,
  input  fp32_t             obs_wdata,
  // parameter stream
  input  logic              in_valid,
  input  logic [DIM_AW-1:0] in_dim,
  input  logic              in_first,
  input  logic              in_last,
  input  fp32_t             mean,
  input  fp32_t             ivar,
  input  fp32_t             gconst,
  // result
  output logic              b_valid,
  output cost_t             b
);

  fp32_t obs_mem [DIM];

  always_ff @(posedge clk) begin
    if (obs_we) obs_mem[obs_waddr] <= obs_wdata;
  end

  // stage registers
  logic  s1_v, s1_first, s1_last;
  fp32_t s1_diff, s1_ivar, s1_gc;
  logic  s2_v, s2_first, s2_last;
  fp32_t s2_sq, s2_ivar, s2_gc;
  logic  s3_v, s3_first, s3_last;
  fp32_t s3_term, s3_gc;
  fp32_t acc;

  // arithmetic
  fp32_t diff, sq, term, acc_base, acc_next;

  fp32_add u_sub  (.a(obs_mem[in_dim]), .b({~mean[31], mean[30:0]}), .y(diff));
  fp32_mul u_sq   (.a(s1_diff), .b(s1_diff), .y(sq));
  fp32_mul u_wt   (.a(s2_sq),   .b(s2_ivar), .y(term));
  fp32_add u_acc  (.a(acc_base), .b(s3_term), .y(acc_next));

  assign acc_base = s3_first ? s3_gc : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0; b_valid <= 1'b0;
      s1_first <= 1'b0; s1_last <= 1'b0; s2_first <= 1'b0; s2_last <= 1'b0;
      s3_first <= 1'b0; s3_last <= 1'b0;
      s1_diff <= '0; s1_ivar <= '0; s1_gc <= '0;
      s2_sq <= '0; s2_ivar <= '0; s2_gc <= '0;
      s3_term <= '0; s3_gc <= '0;
      acc <= '0; b <= '0;
    end else begin
      s1_v     <= in_valid;
      s1_first <= in_first;
      s1_last  <= in_last;
      s1_diff  <= diff;
      s1_ivar  <= ivar;
      s1_gc    <= gconst;

      s2_v     <= s1_v;
      s2_first <= s1_first;
      s2_last  <= s1_last;
      s2_sq    <= sq;
      s2_ivar  <= s1_ivar;
      s2_gc    <= s1_gc;

      s3_v     <= s2_v;
      s3_first <= s2_first;
      s3_last  <= s2_last;
      s3_term  <= term;
      s3_gc    <= s2_gc;

      b_valid  <= 1'b0;
      if (s3_v) begin
        acc <= acc_next;
        if (s3_last) begin
          b_valid <= 1'b1;
          b       <= fp32_to_cost(acc_next);
        end
      end
    end
  end

endmodule
