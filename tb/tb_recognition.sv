// tb_recognition: phone recognition on synthetic speech at full size.
//
// All 49 three-state models get random single-precision means and inverse
// variances. A random sequence of 8 phones is chosen, each state lasting 2 or
// 3 frames, and every observation is the mean vector of the true state plus
// small noise. The testbench plays the host: it decodes the utterance frame
// by frame, collects the predecessor words, and after the last frame
// backtracks from the best model exit reported by the core. The recovered
// state path must be the true state sequence frame for frame, which also
// means the phone sequence is recognised exactly. The frame time
// (5,929 cycles) is checked on every frame.
module tb_recognition;
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
  localparam int NPH = 8;
  localparam int MAXF = NPH * SPM * 3;

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

  fp32_t obs_bank [DIM];
  fp32_t mean_bank [NS*DIM];
  fp32_t ivar_bank [NS*DIM];
  fp32_t gconst_bank [NS];
  int    psi_bank [MAXF*NS];

  always_ff @(posedge clk) begin
    obs_rdata    <= obs_bank[obs_addr];
    model_rdata  <= {mean_bank[model_addr], ivar_bank[model_addr]};
    gconst_rdata <= gconst_bank[gconst_addr];
    if (rst_n && psi_we && int'(psi_addr) < MAXF * NS) psi_bank[int'(psi_addr)] <= int'(psi_wdata);
  end

  int checks = 0, failures = 0;
  int phones [NPH];
  int truth [MAXF];
  int nf;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    int cyc, st, path [MAXF];
    for (int i = 0; i < NS*DIM; i++) begin
      mean_bank[i] = rand_fp(-3.0, 3.0);
      ivar_bank[i] = rand_fp(0.5, 1.0);
    end
    for (int j = 0; j < NS; j++) gconst_bank[j] = r2f(40.0);
    // phone sequence (no phone repeated back to back) and its state alignment
    nf = 0;
    for (int p = 0; p < NPH; p++) begin
      do phones[p] = $urandom_range(0, NM - 1);
      while (p > 0 && phones[p] == phones[p-1]);
      for (int s = 0; s < SPM; s++)
        repeat ($urandom_range(2, 3)) begin truth[nf] = phones[p] * SPM + s; nf++; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // transition costs: self loop and next state about ln 2, model entry and exit about 2 nats
    for (int j = 0; j < NS; j++) begin
      cfg_trans_we = 1'b1; cfg_trans_addr = SAW'(j);
      cfg_trans_wdata = '{a_self: tp_t'(2839), a_in: tp_t'((j % SPM == 0) ? 8192 : 2839)};
      @(negedge clk);
    end
    cfg_trans_we = 1'b0;
    for (int m = 0; m < NM; m++) begin
      cfg_exit_we = 1'b1; cfg_exit_addr = MAW'(m); cfg_exit_wdata = tp_t'(2839);
      @(negedge clk);
    end
    cfg_exit_we = 1'b0;

    for (int t = 0; t < nf; t++) begin
      for (int i = 0; i < DIM; i++)
        obs_bank[i] = fadd(mean_bank[truth[t]*DIM+i], rand_fp(-0.3, 0.3));
      @(negedge clk);
      start = 1'b1; first = (t == 0);
      @(negedge clk);
      start = 1'b0; first = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc == FRAME_CYCLES, $sformatf("frame %0d took %0d cycles", t, cyc));
    end
    @(negedge clk);

    // backtrack from the best model exit
    st = int'(best_exit_state);
    path[nf-1] = st;
    for (int t = nf - 1; t >= 1; t--) begin
      st = psi_bank[(t-1)*NS + st];
      path[t-1] = st;
    end
    for (int t = 0; t < nf; t++)
      chk(path[t] == truth[t], $sformatf("frame %0d: state %0d, true %0d", t, path[t], truth[t]));
    $display("decoded %0d frames, %0d phones", nf, NPH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((MAXF + 2) * FRAME_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
