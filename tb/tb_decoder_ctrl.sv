// tb_decoder_ctrl: checks the frame sequencer on a small configuration
// (2 models x 3 states, 4 dimensions) with a stand-in for the Gaussian engine
// that answers each state's last dimension with b_valid 5 cycles later.
// It checks the observation reads (addresses 0..L-1, load strobes one cycle
// later), the model stream (consecutive addresses, gconst address = state,
// first/last flags one cycle later), the state issue to the HMM block (read
// address in the b_valid cycle, state/entry/init/b one cycle later), the scan
// pass (start, every state once with its exit flag and model, then done),
// the clear pulse and predecessor address counter, and the frame length
// L + N*L + N + 10 from start to done.
module tb_decoder_ctrl;
  import viterbi_pkg::*;
  localparam int NS = 6, SPM = 3, NM = 2, DIM = 4;
  localparam int SAW = $clog2(NS), MAW = $clog2(NM), DAW = $clog2(DIM);
  localparam int PAW = $clog2(NS * DIM + 1);
  localparam int FRAME = DIM + NS * DIM + NS + 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, first = 0, busy, done, clear;
  logic obs_rd, obs_load_we;
  logic [DAW-1:0] obs_addr, obs_load_idx, g_dim;
  logic model_rd, gconst_rd, g_valid, g_first, g_last;
  logic [PAW-1:0] model_addr;
  logic [SAW-1:0] gconst_addr, delta_raddr, trans_raddr, h_state, scan_state;
  logic b_valid;
  cost_t b, h_b;
  logic h_valid, h_init, h_entry;
  logic scan_start, scan_valid, scan_is_exit, scan_done;
  logic [MAW-1:0] scan_model;
  logic psi_we = 0;
  logic [PSI_AW-1:0] psi_addr;

  decoder_ctrl #(.NS(NS), .SPM(SPM), .NM(NM), .DIM(DIM)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s @%0t", s, $time); end
  endtask

  // Gaussian stand-in: b_valid 4 cycles after g_last (as the real engine)
  logic [4:0] pipe = '0;
  int bcount = 0;
  always_ff @(posedge clk) begin
    pipe <= {pipe[3:0], g_valid && g_last};
  end
  always @(posedge clk) if (b_valid) bcount <= bcount + 1;

  always_comb begin
    b_valid = pipe[3];
    b = cost_t'(1000 + bcount);
  end

  // monitors
  int n_obs, n_obs_we, n_model, n_g, n_h, n_scan, n_scan_start, n_scan_done;
  int exp_model_addr, last_b_state;
  bit prev_obs_rd, prev_model_rd, prev_b_valid, cur_init;
  int prev_obs_addr, prev_model_addr, prev_b_state;

  always @(posedge clk) if (rst_n) begin
    // observation loads follow reads by one cycle
    chk(obs_load_we == prev_obs_rd, "obs_load_we timing");
    if (obs_load_we) chk(int'(obs_load_idx) == prev_obs_addr, "obs_load_idx");
    if (obs_rd) begin chk(int'(obs_addr) == n_obs, "obs_addr order"); n_obs++; end
    if (model_rd) begin
      chk(int'(model_addr) == n_model, "model_addr order");
      chk(int'(gconst_addr) == n_model / DIM, "gconst_addr");
      chk(gconst_rd, "gconst_rd");
      n_model++;
    end
    chk(g_valid == prev_model_rd, "g_valid timing");
    if (g_valid) begin
      chk(int'(g_dim) == prev_model_addr % DIM, "g_dim");
      chk(g_first == (prev_model_addr % DIM == 0), "g_first");
      chk(g_last == (prev_model_addr % DIM == DIM - 1), "g_last");
    end
    if (b_valid) begin
      chk(int'(delta_raddr) == bcount && int'(trans_raddr) == bcount, "update read address");
    end
    chk(h_valid == prev_b_valid, "h_valid timing");
    if (h_valid) begin
      chk(int'(h_state) == n_h, "h_state");
      chk(h_entry == (n_h % SPM == 0), "h_entry");
      chk(h_init == cur_init, "h_init");
      chk(longint'(h_b) == 1000 + longint'(n_h), "h_b");
      n_h++;
    end
    if (scan_start) begin n_scan_start++; chk(n_h == NS, "scan before all updates"); end
    if (scan_valid) begin
      chk(int'(scan_state) == n_scan, "scan_state");
      chk(scan_is_exit == (n_scan % SPM == SPM - 1), "scan_is_exit");
      chk(int'(scan_model) == n_scan / SPM, "scan_model");
      n_scan++;
    end
    if (scan_done) begin n_scan_done++; chk(n_scan == NS, "scan_done early"); end
    prev_obs_rd = obs_rd; prev_obs_addr = int'(obs_addr);
    prev_model_rd = model_rd; prev_model_addr = int'(model_addr);
    prev_b_valid = b_valid;
  end

  // scan read address: each scanned state was addressed one cycle earlier
  int prev_raddr;
  always @(posedge clk) if (rst_n) begin
    if (scan_valid) chk(int'(scan_state) == prev_raddr, "scan read address");
    prev_raddr = int'(delta_raddr);
  end

  task automatic frame(bit init);
    int cyc;
    n_obs = 0; n_model = 0; n_h = 0; n_scan = 0; n_scan_start = 0; n_scan_done = 0;
    bcount = 0; cur_init = init;
    @(negedge clk);
    start = 1; first = init;
    #1 chk(clear == init, "clear");
    @(negedge clk);
    start = 0; first = 0;
    cyc = 1;
    while (!done) begin
      chk(busy, "busy");
      @(negedge clk); cyc++;
    end
    chk(cyc == FRAME, $sformatf("frame %0d cycles exp %0d", cyc, FRAME));
    chk(n_obs == DIM && n_model == NS * DIM && n_h == NS && n_scan == NS, "counts");
    chk(n_scan_start == 1 && n_scan_done == 1, "scan start/done once");
    @(negedge clk);
    chk(!busy, "idle");
  endtask

  initial begin
    int pa;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(1);
    frame(0);
    frame(0);
    // predecessor address counter
    pa = int'(psi_addr);
    psi_we = 1; repeat (5) @(negedge clk); psi_we = 0;
    chk(int'(psi_addr) == pa + 5, "psi_addr increments");
    frame(1);
    chk(psi_addr == '0, "psi_addr cleared by first frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8 * FRAME + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
