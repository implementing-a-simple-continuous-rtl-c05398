// tb_between_hmm_max: scans random scores over models of 3 states and checks
// the latched best exit cost (last-state score + exit cost, saturating) and
// the state it belongs to; non-exit states must be ignored, and clear must
// give COST_INF.
module tb_between_hmm_max;
  import viterbi_pkg::*;
  localparam int NS = 30, SPM = 3;
  localparam int SAW = $clog2(NS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, scan_start = 0, scan_valid = 0, scan_is_exit = 0, scan_done = 0;
  cost_t scan_delta = '0, best_cost;
  logic [SAW-1:0] scan_state = '0, best_state;
  tp_t exit_cost = '0;
  int checks = 0, failures = 0;

  between_hmm_max #(.NS(NS)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    longint m; int ms;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    chk(best_cost == COST_INF, "clear");
    for (int pass = 0; pass < 40; pass++) begin
      scan_start = 1; @(negedge clk); scan_start = 0;
      m = 64'hFFFF_FFFF; ms = 0;
      for (int j = 0; j < NS; j++) begin
        automatic longint v = longint'($urandom_range(0, 50000));
        automatic longint x = longint'($urandom_range(0, 65535));
        automatic bit ex = (j % SPM == SPM - 1);
        if (pass == 6 && j == 5) v = 64'hFFFF_FFF0;   // saturates with its exit cost
        if (!ex) v = v / 4;                          // better, but not an exit
        scan_valid = 1; scan_delta = cost_t'(v); scan_state = SAW'(j);
        scan_is_exit = ex; exit_cost = tp_t'(x);
        if (ex) begin
          automatic longint c = v + x;
          if (c > 64'hFFFF_FFFF) c = 64'hFFFF_FFFF;
          if (c < m) begin m = c; ms = j; end
        end
        @(negedge clk);
      end
      scan_valid = 0;
      scan_done = 1; @(negedge clk); scan_done = 0;
      chk(longint'(best_cost) == m, $sformatf("best %0d exp %0d", best_cost, m));
      chk(int'(best_state) == ms, $sformatf("state %0d exp %0d", best_state, ms));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
