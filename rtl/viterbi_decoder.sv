// viterbi_decoder: continuous-HMM Viterbi decoder core for phone recognition.
//
// The core scores a bank of left-to-right HMMs (49 monophones of 3 emitting
// states by default) against a stream of feature vectors, one vector per
// start pulse, and writes the most likely predecessor psi_t(j) of every state
// to an external bank, from which the host backtracks the best phone
// sequence. Scores are kept as negative log probabilities, so the recursion
//   delta_t(j) = min_i [delta_{t-1}(i) + a_ij] + b_j(O_t)
// needs only adders and comparators. The observation cost b_j(O_t) of each
// state is computed on chip from a diagonal Gaussian (obs_prob_unit) in
// single-precision floating point, the format of the feature and model data.
//
// Data path per frame:
//   delta store -> init switch -> scaler (subtract frame minimum) -> HMM block
//   -> delta store, with the between-HMM unit supplying the best model exit
//   (scaled by the same minimum) as the entry score of every model.
//
// External memories (board SRAM shared with the host, all read synchronously
// with one cycle of latency):
//   observation bank  O_t(i), i = 0..L-1 at word i
//   model bank        {mean_ji, ivar_ji} at word j*L + i (64 bits: two banks)
//   constant bank     gconst_j at word j
//   predecessor bank  psi words written in frame order
// Transition costs (block RAM) and model exit costs (distributed RAM) live on
// chip and are loaded through the cfg ports while the core is idle.
//
// Handshake: the host writes O_t, pulses start (with first = 1 for the first
// frame of an utterance) and waits for done (busy low). After the last frame,
// best_exit_state/best_exit_cost give the final state of the best path and
// frame_min/frame_min_state the best state overall.
//
// The block structure (init switch, scaler, between-HMM search and scaling,
// HMM block, transition block RAM, between-HMM LUT RAM) and the model size
// follow the original decoder; the memory layout, handshake, start scores
// and number formats are this design's own.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned NM     = N_MODELS,
  parameter int unsigned SPM    = STATES_PER_MODEL,
  parameter int unsigned DIM    = FEAT_DIM,
  parameter int unsigned NS     = NM * SPM,
  parameter int unsigned SAW    = (NS > 1) ? $clog2(NS) : 1,
  parameter int unsigned MAW    = (NM > 1) ? $clog2(NM) : 1,
  parameter int unsigned DIM_AW = (DIM > 1) ? $clog2(DIM) : 1,
  parameter int unsigned PAW    = $clog2(NS * DIM + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // frame handshake
  input  logic                    start,
  input  logic                    first,
  output logic                    busy,
  output logic                    done,
  // observation bank
  output logic                    obs_rd,
  output logic [DIM_AW-1:0]       obs_addr,
  input  fp32_t                   obs_rdata,
  // model bank: {mean, 1/(2 sigma^2)}, two single-precision words
  output logic                    model_rd,
  output logic [PAW-1:0]          model_addr,
  input  logic [2*FP_W-1:0]       model_rdata,
  // per-state constant bank
  output logic                    gconst_rd,
  output logic [SAW-1:0]          gconst_addr,
  input  fp32_t                   gconst_rdata,
  // predecessor bank
  output logic                    psi_we,
  output logic [PSI_AW-1:0]       psi_addr,
  output logic [SAW-1:0]          psi_wdata,
  // on-chip table loading
  input  logic                    cfg_trans_we,
  input  logic [SAW-1:0]          cfg_trans_addr,
  input  trans_t                  cfg_trans_wdata,
  input  logic                    cfg_exit_we,
  input  logic [MAW-1:0]          cfg_exit_addr,
  input  tp_t                     cfg_exit_wdata,
  // results of the latest scan
  output cost_t                   frame_min,
  output logic [SAW-1:0]          frame_min_state,
  output cost_t                   best_exit_cost,
  output logic [SAW-1:0]          best_exit_state
);

  // sequencer outputs
  logic              clear;
  logic              obs_load_we;
  logic [DIM_AW-1:0] obs_load_idx;
  logic              g_valid, g_first, g_last;
  logic [DIM_AW-1:0] g_dim;
  logic              b_valid;
  cost_t             b;
  logic [SAW-1:0]    delta_raddr, trans_raddr;
  logic              h_valid, h_init, h_entry;
  logic [SAW-1:0]    h_state;
  cost_t             h_b;
  logic              scan_start, scan_valid, scan_is_exit, scan_done;
  logic [SAW-1:0]    scan_state;
  logic [MAW-1:0]    scan_model;

  // data path
  cost_t             delta_rdata, delta_unscaled, delta_scaled, b_fwd;
  trans_t            trans_rdata;
  tp_t               exit_cost;
  cost_t             between_scaled;
  logic              hmm_valid, hmm_psi_valid;
  logic [SAW-1:0]    hmm_state, hmm_psi;
  cost_t             hmm_delta;

  decoder_ctrl #(
    .NS(NS), .SPM(SPM), .NM(NM), .DIM(DIM), .SAW(SAW), .MAW(MAW),
    .DIM_AW(DIM_AW), .PAW(PAW)
  ) u_ctrl (
    .clk, .rst_n, .start, .first, .busy, .done, .clear,
    .obs_rd, .obs_addr, .obs_load_we, .obs_load_idx,
    .model_rd, .model_addr, .gconst_rd, .gconst_addr,
    .g_valid, .g_dim, .g_first, .g_last, .b_valid, .b,
    .delta_raddr, .trans_raddr,
    .h_valid, .h_init, .h_entry, .h_state, .h_b,
    .scan_start, .scan_valid, .scan_is_exit, .scan_state, .scan_model, .scan_done,
    .psi_we(hmm_psi_valid), .psi_addr
  );

  obs_prob_unit #(.DIM(DIM), .DIM_AW(DIM_AW)) u_gauss (
    .clk, .rst_n,
    .obs_we(obs_load_we), .obs_waddr(obs_load_idx), .obs_wdata(obs_rdata),
    .in_valid(g_valid), .in_dim(g_dim), .in_first(g_first), .in_last(g_last),
    .mean(model_rdata[2*FP_W-1:FP_W]), .ivar(model_rdata[FP_W-1:0]),
    .gconst(gconst_rdata),
    .b_valid, .b
  );

  delta_ram #(.NS(NS), .SAW(SAW)) u_delta (
    .clk, .we(hmm_valid), .waddr(hmm_state), .wdata(hmm_delta),
    .raddr(delta_raddr), .rdata(delta_rdata)
  );

  trans_prob_ram #(.NS(NS), .SAW(SAW)) u_trans (
    .clk, .we(cfg_trans_we), .waddr(cfg_trans_addr), .wdata(cfg_trans_wdata),
    .raddr(trans_raddr), .rdata(trans_rdata)
  );

  between_prob_ram #(.NM(NM), .MAW(MAW)) u_exit (
    .clk, .we(cfg_exit_we), .waddr(cfg_exit_addr), .wdata(cfg_exit_wdata),
    .raddr(scan_model), .rdata(exit_cost)
  );

  init_switch u_init (
    .init(h_valid && h_init), .is_entry(h_entry), .b_in(h_b),
    .delta_fb(delta_rdata), .delta_out(delta_unscaled), .b_out(b_fwd)
  );

  scaler #(.NS(NS), .SAW(SAW)) u_scaler (
    .clk, .rst_n, .clear,
    .scan_start, .scan_valid, .scan_delta(delta_unscaled), .scan_state, .scan_done,
    .min_out(frame_min), .min_state(frame_min_state),
    .in_delta(delta_unscaled), .out_scaled(delta_scaled)
  );

  between_hmm_max #(.NS(NS), .SAW(SAW)) u_between (
    .clk, .rst_n, .clear,
    .scan_start, .scan_valid, .scan_is_exit, .scan_delta(delta_unscaled),
    .scan_state, .exit_cost, .scan_done,
    .best_cost(best_exit_cost), .best_state(best_exit_state)
  );

  between_hmm_scale u_between_scale (
    .best_cost(best_exit_cost), .frame_min(frame_min), .scaled_cost(between_scaled)
  );

  hmm_block #(.NS(NS), .SAW(SAW)) u_hmm (
    .clk, .rst_n,
    .in_valid(h_valid), .in_init(h_init), .in_entry(h_entry), .in_state(h_state),
    .in_b(b_fwd), .in_delta(delta_scaled), .in_trans(trans_rdata),
    .between_cost(between_scaled), .between_state(best_exit_state),
    .out_valid(hmm_valid), .out_psi_valid(hmm_psi_valid), .out_state(hmm_state),
    .out_delta(hmm_delta), .out_psi(hmm_psi)
  );

  assign psi_we    = hmm_psi_valid;
  assign psi_wdata = hmm_psi;

endmodule
