// tb_viterbi_decoder: end-to-end test of the decoder at its default size
// (49 models x 3 states, 39-dimensional features).
//
// The testbench plays the host and the board memories: it holds the
// observation, model, constant and predecessor banks as arrays with one
// cycle of read latency, loads random transition and exit costs into the
// core, and decodes two utterances (6 and 4 frames) of random feature vectors.
// A reference model recomputes the Gaussian costs in correctly rounded single
// precision (fp_ref_pkg) and the scaled Viterbi recursion with 64-bit
// integers; every predecessor word (address and
// value), the frame minimum, the best model exit and the cycle count of every
// frame are compared with it. It also counts how often each mechanism of the
// design occurred: init frame, entry through the between-HMM path, in-model
// move, self loop, non-zero scaling, unreachable (log-zero) states, and a
// restart of the predecessor address at a new utterance; any that never
// happened counts as a failure.
module tb_viterbi_decoder;
  import viterbi_pkg::*;
  import fp_ref_pkg::*;

  localparam int NM  = N_MODELS;
  localparam int SPM = STATES_PER_MODEL;
  localparam int NS  = NM * SPM;
  localparam int DIM = FEAT_DIM;
  localparam int SAW = $clog2(NS);
  localparam int MAW = $clog2(NM);
  localparam int DAW = $clog2(DIM);
  localparam int PAW = $clog2(NS * DIM + 1);
  localparam int FRAME_CYCLES = DIM + NS * DIM + NS + 10;
  localparam longint INF = 64'hFFFF_FFFF;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, first = 1'b0, busy, done;
  logic obs_rd, model_rd, gconst_rd, psi_we;
  logic [DAW-1:0] obs_addr;
  fp32_t obs_rdata;
  logic [PAW-1:0] model_addr;
  logic [2*FP_W-1:0] model_rdata;
  logic [SAW-1:0] gconst_addr;
  fp32_t gconst_rdata;
  logic [PSI_AW-1:0] psi_addr;
  logic [SAW-1:0] psi_wdata;
  logic cfg_trans_we = 1'b0, cfg_exit_we = 1'b0;
  logic [SAW-1:0] cfg_trans_addr = '0;
  trans_t cfg_trans_wdata = '0;
  logic [MAW-1:0] cfg_exit_addr = '0;
  tp_t cfg_exit_wdata = '0;
  cost_t frame_min, best_exit_cost;
  logic [SAW-1:0] frame_min_state, best_exit_state;

  viterbi_decoder dut (.*);

  // board memories
  fp32_t obs_bank [DIM];
  fp32_t mean_bank [NS*DIM];
  fp32_t ivar_bank [NS*DIM];
  fp32_t gconst_bank [NS];

  always_ff @(posedge clk) begin
    obs_rdata    <= obs_bank[obs_addr];
    model_rdata  <= {mean_bank[model_addr], ivar_bank[model_addr]};
    gconst_rdata <= gconst_bank[gconst_addr];
  end

  // reference state
  longint a_self [NS], a_in [NS], exit_c [NM];
  longint delta [NS], bj [NS];
  longint ref_min, ref_best;
  int     ref_min_state, ref_best_state;
  int     exp_psi [NS];
  bit     expect_psi;
  int     psi_base, psi_seen;

  int checks = 0, failures = 0;
  int n_init = 0, n_between = 0, n_move = 0, n_self = 0, n_scaled = 0, n_inf = 0, n_restart = 0;

  function automatic longint sat(longint v);
    return (v >= INF) ? INF : v;
  endfunction
  function automatic longint scl(longint d, longint m);
    if (d == INF) return INF;
    if (d < m) return 0;
    return d - m;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // predecessor bank monitor
  always @(posedge clk) begin
    if (rst_n && psi_we) begin
      check(expect_psi && psi_seen < NS, "unexpected psi write");
      if (psi_seen < NS) begin
        check(int'(psi_addr) == psi_base + psi_seen,
              $sformatf("psi addr %0d exp %0d", psi_addr, psi_base + psi_seen));
        check(int'(psi_wdata) == exp_psi[psi_seen],
              $sformatf("psi[%0d] = %0d exp %0d", psi_seen, psi_wdata, exp_psi[psi_seen]));
      end
      psi_seen++;
    end
  end

  task automatic ref_scan();
    ref_min = INF; ref_min_state = 0; ref_best = INF; ref_best_state = 0;
    for (int j = 0; j < NS; j++) begin
      if (delta[j] < ref_min) begin ref_min = delta[j]; ref_min_state = j; end
      if (j % SPM == SPM - 1) begin
        longint c = sat(delta[j] + exit_c[j / SPM]);
        if (c < ref_best) begin ref_best = c; ref_best_state = j; end
      end
    end
  endtask

  task automatic ref_frame(bit init);
    longint dsc [NS];
    longint bsc;
    logic [31:0] o [], mu [], iv [];
    o = new[DIM]; mu = new[DIM]; iv = new[DIM];
    foreach (o[i]) o[i] = obs_bank[i];
    for (int j = 0; j < NS; j++) begin
      for (int i = 0; i < DIM; i++) begin
        mu[i] = mean_bank[j*DIM+i];
        iv[i] = ivar_bank[j*DIM+i];
      end
      bj[j] = to_cost(gauss_cost(gconst_bank[j], o, mu, iv), int'(COST_FRAC));
    end
    if (init) begin
      for (int j = 0; j < NS; j++) delta[j] = (j % SPM == 0) ? bj[j] : INF;
      n_init++;
    end else begin
      if (ref_min != 0) n_scaled++;
      for (int j = 0; j < NS; j++) dsc[j] = scl(delta[j], ref_min);
      bsc = scl(ref_best, ref_min);
      for (int j = 0; j < NS; j++) begin
        longint stay = sat(dsc[j] + a_self[j]);
        bit entry = (j % SPM == 0);
        longint from = entry ? bsc : dsc[j-1];
        int fst = entry ? ref_best_state : j - 1;
        longint enter = sat(from + a_in[j]);
        longint best;
        if (enter < stay) begin
          best = enter; exp_psi[j] = fst;
          if (entry) n_between++; else n_move++;
        end else begin
          best = stay; exp_psi[j] = j; n_self++;
        end
        delta[j] = sat(best + bj[j]);
        if (delta[j] == INF) n_inf++;
      end
    end
    ref_scan();
  endtask

  task automatic run_frame(bit init);
    int cyc;
    for (int i = 0; i < DIM; i++) obs_bank[i] = rand_fp(-3.0, 3.0);
    ref_frame(init);
    expect_psi = !init;
    psi_seen = 0;
    @(negedge clk);
    start = 1'b1; first = init;
    @(negedge clk);
    start = 1'b0; first = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == FRAME_CYCLES, $sformatf("frame took %0d cycles, exp %0d", cyc, FRAME_CYCLES));
    @(negedge clk);
    check(!busy, "busy after done");
    check(psi_seen == (init ? 0 : NS), $sformatf("psi writes %0d", psi_seen));
    check(longint'(frame_min) == ref_min, $sformatf("frame_min %0d exp %0d", frame_min, ref_min));
    check(int'(frame_min_state) == ref_min_state, "frame_min_state");
    check(longint'(best_exit_cost) == ref_best,
          $sformatf("best_exit %0d exp %0d", best_exit_cost, ref_best));
    check(int'(best_exit_state) == ref_best_state, "best_exit_state");
    if (!init) psi_base += NS;
  endtask

  initial begin
    for (int i = 0; i < NS*DIM; i++) begin
      mean_bank[i] = rand_fp(-3.0, 3.0);
      ivar_bank[i] = rand_fp(0.02, 0.5);
    end
    for (int j = 0; j < NS; j++) begin
      gconst_bank[j] = rand_fp(20.0, 60.0);
      a_self[j] = longint'($urandom_range(0, 65535));
      a_in[j]   = longint'($urandom_range(0, 65535));
    end
    for (int m = 0; m < NM; m++) exit_c[m] = longint'($urandom_range(0, 65535));
    expect_psi = 0; psi_base = 0; psi_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // load on-chip tables
    for (int j = 0; j < NS; j++) begin
      cfg_trans_we = 1'b1; cfg_trans_addr = SAW'(j);
      cfg_trans_wdata = '{a_self: tp_t'(a_self[j]), a_in: tp_t'(a_in[j])};
      @(negedge clk);
    end
    cfg_trans_we = 1'b0;
    for (int m = 0; m < NM; m++) begin
      cfg_exit_we = 1'b1; cfg_exit_addr = MAW'(m); cfg_exit_wdata = tp_t'(exit_c[m]);
      @(negedge clk);
    end
    cfg_exit_we = 1'b0;
    // utterance 1
    run_frame(1'b1);
    for (int f = 1; f < 6; f++) run_frame(1'b0);
    // utterance 2: predecessor addresses restart at 0
    psi_base = 0;
    run_frame(1'b1);
    run_frame(1'b0);
    check(psi_seen == NS, "second utterance psi count");
    n_restart++;
    for (int f = 2; f < 4; f++) run_frame(1'b0);

    $display("mechanisms: init=%0d between_entry=%0d move=%0d self=%0d scaled=%0d log_zero=%0d restart=%0d",
             n_init, n_between, n_move, n_self, n_scaled, n_inf, n_restart);
    check(n_init > 0, "no init frame");
    check(n_between > 0, "between-HMM entry never taken");
    check(n_move > 0, "in-model move never taken");
    check(n_self > 0, "self loop never taken");
    check(n_scaled > 0, "scaling never non-zero");
    check(n_inf > 0, "no log-zero state");
    check(n_restart > 0, "no utterance restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * FRAME_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
