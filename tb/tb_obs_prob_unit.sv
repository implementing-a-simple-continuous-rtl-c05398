// tb_obs_prob_unit: checks the Gaussian observation-cost engine.
//
// Loads a random single-precision observation vector, then streams 40 states
// of random means, inverse variances and constants back to back (one
// dimension per cycle, no gap between states). Each b_j is compared bit for
// bit with a reference that evaluates gconst + sum (o - mu)^2 * ivar in
// correctly rounded single precision, in the same order, and converts it to
// a cost. The latency from a state's last dimension to b_valid is checked to
// be 4 cycles. Extra states check the clamp of a negative sum to 0 and
// saturation to COST_INF.
module tb_obs_prob_unit;
  import viterbi_pkg::*;
  import fp_ref_pkg::*;

  localparam int DIM = FEAT_DIM;
  localparam int DAW = $clog2(DIM);
  localparam int NST = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic obs_we = 0;
  logic [DAW-1:0] obs_waddr = '0;
  fp32_t obs_wdata = '0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [DAW-1:0] in_dim = '0;
  fp32_t mean = '0, ivar = '0, gconst = '0;
  logic b_valid;
  cost_t b;

  obs_prob_unit dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] obs [];
  longint expq [$];
  int last_cyc [$];
  int cyc = 0;

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && b_valid) begin
    longint e;
    int lc;
    e  = expq.pop_front();
    lc = last_cyc.pop_front();
    checks += 2;
    if (longint'(b) != e) begin failures++; $display("FAIL b=%0d exp %0d", b, e); end
    if (cyc - lc != 5) begin failures++; $display("FAIL latency %0d", cyc - lc); end
  end

  // kind 0: typical, 1: negative sum (clamps to 0), 2: huge (saturates)
  task automatic send_state(int kind);
    logic [31:0] mu [], iv [];
    logic [31:0] gc;
    mu = new[DIM]; iv = new[DIM];
    gc = (kind == 1) ? r2f(-1.0e6) : rand_fp(0.0, 100.0);
    for (int i = 0; i < DIM; i++) begin
      mu[i] = rand_fp(-3.0, 3.0);
      iv[i] = (kind == 2) ? r2f(1.0e8) : rand_fp(0.02, 0.5);
    end
    expq.push_back(to_cost(gauss_cost(gc, obs, mu, iv), int'(COST_FRAC)));
    for (int i = 0; i < DIM; i++) begin
      in_valid = 1; in_dim = DAW'(i); in_first = (i == 0); in_last = (i == DIM - 1);
      mean = mu[i]; ivar = iv[i]; gconst = gc;
      if (i == DIM - 1) last_cyc.push_back(cyc);
      @(negedge clk);
    end
  endtask

  initial begin
    obs = new[DIM];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DIM; i++) begin
      obs[i] = rand_fp(-3.0, 3.0);
      obs_we = 1; obs_waddr = DAW'(i); obs_wdata = obs[i];
      @(negedge clk);
    end
    obs_we = 0;
    for (int s = 0; s < NST; s++) send_state(0);
    send_state(1);
    send_state(2);
    send_state(0);
    in_valid = 0; in_first = 0; in_last = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
