// tb_hmm_block: feeds random states of 3-state models (in order, with random
// gaps) to the add-compare-select block and compares delta_t and psi_t one
// cycle later with a reference evaluation of min(stay, enter) + b, including
// the between-HMM entry of first states, COST_INF inputs, ties (self loop
// wins) and init mode pass-through.
module tb_hmm_block;
  import viterbi_pkg::*;
  localparam int NS = 30, SPM = 3;
  localparam int SAW = $clog2(NS);
  localparam longint INF = 64'hFFFF_FFFF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_init = 0, in_entry = 0;
  logic [SAW-1:0] in_state = '0, between_state = '0;
  cost_t in_b = '0, in_delta = '0, between_cost = '0;
  trans_t in_trans = '0;
  logic out_valid, out_psi_valid;
  logic [SAW-1:0] out_state, out_psi;
  cost_t out_delta;
  int checks = 0, failures = 0;
  int n_enter = 0, n_move = 0, n_self = 0;

  hmm_block #(.NS(NS)) dut (.*);

  function automatic longint sat(longint v);
    return v >= INF ? INF : v;
  endfunction

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    longint prev, d, b, as, ai, bc, stay, from, enter, e; int fs, ep;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 6; pass++) begin
      automatic bit init = (pass == 0);
      bc = (pass == 3) ? INF : longint'($urandom_range(0, 3000));
      between_cost = cost_t'(bc);
      between_state = SAW'($urandom_range(0, NS - 1) | 2);
      for (int j = 0; j < NS; j++) begin
        d  = ($urandom_range(0, 7) == 0) ? INF : longint'($urandom_range(0, 3000));
        b  = longint'($urandom_range(0, 3000));
        as = longint'($urandom_range(0, 2000));
        ai = (j == 4) ? as : longint'($urandom_range(0, 2000));
        if (j == 4) d = 1000;
        in_valid = 1; in_init = init; in_entry = (j % SPM == 0);
        in_state = SAW'(j); in_b = cost_t'(b); in_delta = cost_t'(d);
        in_trans = '{a_self: tp_t'(as), a_in: tp_t'(ai)};
        stay  = sat(d + as);
        from  = (j % SPM == 0) ? bc : prev;
        fs    = (j % SPM == 0) ? int'(between_state) : j - 1;
        enter = sat(from + ai);
        if (init) begin e = d; ep = j; end
        else if (enter < stay) begin
          e = sat(enter + b); ep = fs;
          if (j % SPM == 0) n_enter++; else n_move++;
        end else begin e = sat(stay + b); ep = j; n_self++; end
        prev = d;
        @(negedge clk);
        in_valid = 0;
        chk(out_valid && out_state == SAW'(j), "valid/state");
        chk(out_psi_valid == !init, "psi_valid");
        chk(longint'(out_delta) == e, $sformatf("p%0d j%0d delta %0d exp %0d", pass, j, out_delta, e));
        if (!init) chk(int'(out_psi) == ep, $sformatf("p%0d j%0d psi %0d exp %0d", pass, j, out_psi, ep));
        repeat ($urandom_range(0, 2)) begin
          @(negedge clk);
          chk(!out_valid, "spurious valid");
        end
      end
    end
    chk(n_enter > 0 && n_move > 0 && n_self > 0, "all three paths taken");
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
