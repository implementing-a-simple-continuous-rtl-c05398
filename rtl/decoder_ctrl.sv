// decoder_ctrl: frame sequencer of the Viterbi decoder.
//
// One start pulse processes one observation frame in four phases:
//   LOAD    - reads the L feature values of O_t from the observation bank
//             (one per cycle) into the observation-cost engine.
//   COMPUTE - streams the mean/ivar word of every (state, dimension) pair from
//             the model bank, one per cycle, state-major, and the state's
//             gconst from the constant bank. As each b_j(O_t) comes out of the
//             engine the sequencer reads delta_{t-1}(j) and the transition word
//             of j and presents state j to the HMM block one cycle later, so the
//             add-compare-select runs under the shadow of the next state's
//             Gaussian. On the first frame (first = 1 at start) the HMM block
//             runs in init mode.
//   DRAIN   - waits until the last state's new score is written back.
//   SCAN    - reads delta_t(j) of all states once more through the init switch
//             into the scaler and the between-HMM unit, which latch the frame
//             minimum and best model exit for the next frame (and, after the
//             last frame, for the host's backtrack).
// done pulses for one cycle at the end; busy is high from start to done.
// Each predecessor written by the HMM block gets the next word address of the
// predecessor bank (psi_addr), starting from 0 at the first frame.
//
// A frame takes L + N*L + N + 10 cycles from the start pulse to done (5929
// for L = 39, N = 147: 134.8 us at 44 MHz), which is
// dominated by the one-multiply-per-cycle Gaussian stream. All memory reads
// here are assumed synchronous with one cycle of latency.
//
// The frame target (about 134 us at 44 MHz) comes from the original system;
// the phases, their order and the bank handshake are this design's own.
module decoder_ctrl
  import viterbi_pkg::*;
#(
  parameter int unsigned NS     = N_STATES,
  parameter int unsigned SPM    = STATES_PER_MODEL,
  parameter int unsigned NM     = NS / SPM,
  parameter int unsigned DIM    = FEAT_DIM,
  parameter int unsigned SAW    = (NS > 1) ? $clog2(NS) : 1,
  parameter int unsigned MAW    = (NM > 1) ? $clog2(NM) : 1,
  parameter int unsigned DIM_AW = (DIM > 1) ? $clog2(DIM) : 1,
  parameter int unsigned PAW    = $clog2(NS * DIM + 1),
  parameter int unsigned SPM_W  = (SPM > 1) ? $clog2(SPM) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              first,
  output logic              busy,
  output logic              done,
  output logic              clear,        // start of utterance
  // observation bank
  output logic              obs_rd,
  output logic [DIM_AW-1:0] obs_addr,
  output logic              obs_load_we,
  output logic [DIM_AW-1:0] obs_load_idx,
  // model and constant banks
  output logic              model_rd,
  output logic [PAW-1:0]    model_addr,
  output logic              gconst_rd,
  output logic [SAW-1:0]    gconst_addr,
  // observation-cost engine stream (aligned with bank read data)
  output logic              g_valid,
  output logic [DIM_AW-1:0] g_dim,
  output logic              g_first,
  output logic              g_last,
  input  logic              b_valid,
  input  cost_t             b,
  // state memories
  output logic [SAW-1:0]    delta_raddr,
  output logic [SAW-1:0]    trans_raddr,
  // HMM block issue (aligned with memory read data)
  output logic              h_valid,
  output logic              h_init,
  output logic              h_entry,
  output logic [SAW-1:0]    h_state,
  output cost_t             h_b,
  // scan pass (aligned with memory read data)
  output logic              scan_start,
  output logic              scan_valid,
  output logic              scan_is_exit,
  output logic [SAW-1:0]    scan_state,
  output logic [MAW-1:0]    scan_model,
  output logic              scan_done,
  // predecessor bank write address
  input  logic              psi_we,
  output logic [PSI_AW-1:0] psi_addr
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_COMPUTE, S_DRAIN, S_DRAIN2, S_SCAN, S_SCAN_END, S_LATCH, S_DONE
  } state_e;

  state_e state_q;

  logic              first_frame;
  logic [DIM_AW-1:0] ld_idx, c_dim;
  logic [SAW-1:0]    c_state, u_state, sc_state;
  logic [SPM_W-1:0]  u_pos, sc_pos;
  logic [MAW-1:0]    sc_m;
  logic [PAW-1:0]    c_addr;

  wire last_dim   = (c_dim == DIM_AW'(DIM - 1));
  wire last_state = (c_state == SAW'(NS - 1));

  // Phase sequencing and stream generation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      first_frame  <= 1'b0;
      ld_idx       <= '0;
      c_dim        <= '0;
      c_state      <= '0;
      c_addr       <= '0;
      sc_state     <= '0;
      sc_pos       <= '0;
      sc_m         <= '0;
      obs_load_we  <= 1'b0;
      obs_load_idx <= '0;
      g_valid      <= 1'b0;
      g_dim        <= '0;
      g_first      <= 1'b0;
      g_last       <= 1'b0;
      scan_valid   <= 1'b0;
      scan_is_exit <= 1'b0;
      scan_state   <= '0;
      scan_model   <= '0;
    end else begin
      obs_load_we  <= obs_rd;
      obs_load_idx <= obs_addr;
      g_valid      <= model_rd;
      g_dim        <= c_dim;
      g_first      <= (c_dim == '0);
      g_last       <= last_dim;
      scan_valid   <= (state_q == S_SCAN);
      scan_is_exit <= (sc_pos == SPM_W'(SPM - 1));
      scan_state   <= sc_state;
      scan_model   <= sc_m;

      unique case (state_q)
        S_IDLE: if (start) begin
          first_frame <= first;
          ld_idx      <= '0;
          state_q     <= S_LOAD;
        end
        S_LOAD: begin
          ld_idx <= ld_idx + 1'b1;
          if (ld_idx == DIM_AW'(DIM - 1)) begin
            c_dim   <= '0;
            c_state <= '0;
            c_addr  <= '0;
            state_q <= S_COMPUTE;
          end
        end
        S_COMPUTE: begin
          c_addr <= c_addr + 1'b1;
          if (last_dim) begin
            c_dim   <= '0;
            c_state <= c_state + 1'b1;
            if (last_state) state_q <= S_DRAIN;
          end else begin
            c_dim <= c_dim + 1'b1;
          end
        end
        S_DRAIN: if (h_valid && h_state == SAW'(NS - 1)) state_q <= S_DRAIN2;
        S_DRAIN2: begin
          sc_state <= '0;
          sc_pos   <= '0;
          sc_m     <= '0;
          state_q  <= S_SCAN;
        end
        S_SCAN: begin
          sc_state <= sc_state + 1'b1;
          if (sc_pos == SPM_W'(SPM - 1)) begin
            sc_pos <= '0;
            sc_m   <= sc_m + 1'b1;
          end else begin
            sc_pos <= sc_pos + 1'b1;
          end
          if (sc_state == SAW'(NS - 1)) state_q <= S_SCAN_END;
        end
        S_SCAN_END: state_q <= S_LATCH;
        S_LATCH:    state_q <= S_DONE;
        S_DONE:     state_q <= S_IDLE;
        default:    state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = (state_q != S_IDLE);
    done        = (state_q == S_DONE);
    clear       = (state_q == S_IDLE) && start && first;
    obs_rd      = (state_q == S_LOAD);
    obs_addr    = ld_idx;
    model_rd    = (state_q == S_COMPUTE);
    model_addr  = c_addr;
    gconst_rd   = model_rd;
    gconst_addr = c_state;
    scan_start  = (state_q == S_DRAIN2);
    scan_done   = (state_q == S_LATCH);
    delta_raddr = (state_q == S_SCAN) ? sc_state : u_state;
    trans_raddr = u_state;
  end

  // Update side: follows the engine's b_valid pulses, states in order
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_state <= '0;
      u_pos   <= '0;
      h_valid <= 1'b0;
      h_init  <= 1'b0;
      h_entry <= 1'b0;
      h_state <= '0;
      h_b     <= '0;
    end else begin
      h_valid <= b_valid;
      if (state_q == S_LOAD) begin
        u_state <= '0;
        u_pos   <= '0;
      end else if (b_valid) begin
        h_init  <= first_frame;
        h_entry <= (u_pos == '0);
        h_state <= u_state;
        h_b     <= b;
        u_state <= u_state + 1'b1;
        u_pos   <= (u_pos == SPM_W'(SPM - 1)) ? '0 : u_pos + 1'b1;
      end
    end
  end

  // Predecessor bank address
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      psi_addr <= '0;
    else if (clear)  psi_addr <= '0;
    else if (psi_we) psi_addr <= psi_addr + 1'b1;
  end

  // Handshake rules: observation costs only arrive while the Gaussian stream
  // or its drain is in progress, and the update and scan passes never overlap.
  // The checks start on the second clock edge after reset is released.
  logic chk_live;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_live <= 1'b0;
    else begin
      chk_live <= 1'b1;
      if (chk_live) begin
        a_b_in_frame: assert (!b_valid || state_q == S_COMPUTE || state_q == S_DRAIN);
        a_no_overlap: assert (!(scan_valid && h_valid));
      end
    end

endmodule
