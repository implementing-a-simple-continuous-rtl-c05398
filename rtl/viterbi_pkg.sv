// viterbi_pkg: constants, types and arithmetic helpers shared by the
// continuous-HMM Viterbi decoder.
//
// All scores are kept in the negative-log domain ("costs"): a probability p
// is carried as an unsigned fixed-point value -ln(p), so the products and
// maxima of the Viterbi recursion become saturating additions and minima.
// The all-ones value COST_INF stands for probability zero and is absorbing:
// adding anything to it, or scaling it, leaves it at COST_INF.
//
// Feature vectors and Gaussian parameters arrive as IEEE-754 single-precision
// values (fp32_t); the Gaussian cost is converted once per state into the
// fixed-point cost format (COST_FRAC fractional bits of a nat) used by the
// Viterbi recursion. The model size (49 monophones of 3 emitting states,
// 39-element feature vectors) is the configuration the decoder was built for.
// The cost word widths are choices of this design.
package viterbi_pkg;

  // Model configuration
  localparam int unsigned N_MODELS         = 49;  // monophone HMMs
  localparam int unsigned STATES_PER_MODEL = 3;   // emitting states per HMM
  localparam int unsigned N_STATES         = N_MODELS * STATES_PER_MODEL;
  localparam int unsigned FEAT_DIM         = 39;  // observation vector length L

  // Word widths
  localparam int unsigned FP_W       = 32;  // IEEE-754 single precision
  localparam int unsigned COST_W     = 32;  // path and observation costs
  localparam int unsigned COST_FRAC  = 12;  // fractional bits of a cost (units of nats)
  localparam int unsigned TP_W       = 16;  // transition costs
  localparam int unsigned PSI_AW     = 21;  // word address into the predecessor bank

  typedef logic [COST_W-1:0] cost_t;
  typedef logic [TP_W-1:0]   tp_t;
  typedef logic [FP_W-1:0]   fp32_t;

  localparam cost_t COST_INF = '1;

  // Transition-cost word held per state: cost of staying in the state and
  // cost of entering it (from the previous state, or from the between-HMM
  // path for the first state of a model).
  typedef struct packed {
    tp_t a_self;
    tp_t a_in;
  } trans_t;

  // Saturating addition; COST_INF absorbs.
  function automatic cost_t cost_add(cost_t a, cost_t b);
    logic [COST_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[COST_W] ? COST_INF : s[COST_W-1:0];
  endfunction

  // Subtract the frame minimum; COST_INF stays COST_INF, never below zero.
  function automatic cost_t cost_scale(cost_t d, cost_t m);
    if (d == COST_INF) return COST_INF;
    if (d < m)         return '0;
    return d - m;
  endfunction

  // Single-precision value -> cost: x * 2^COST_FRAC rounded down, negative
  // values and zero give 0, values too large for COST_W give COST_INF.
  function automatic cost_t fp32_to_cost(fp32_t x);
    int          sh;
    logic [23:0] m;
    if (x[31] || x[30:23] == 8'd0) return '0;
    m  = {1'b1, x[22:0]};
    sh = int'(x[30:23]) - 150 + int'(COST_FRAC);
    if (sh > int'(COST_W) - 24) return COST_INF;
    if (sh >= 0)                return cost_t'(m) << sh;
    if (sh <= -24)              return '0;
    return cost_t'(m) >> (-sh);
  endfunction

  function automatic cost_t tp_to_cost(tp_t a);
    return cost_t'(a);
  endfunction

endpackage
