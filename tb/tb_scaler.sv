// tb_scaler: runs several scan passes of random scores (some COST_INF) and
// checks the latched minimum and its first index, that the minimum only
// changes at scan_done, that clear gives an identity scaling, and the
// subtract path (in_delta - min, COST_INF kept).
module tb_scaler;
  import viterbi_pkg::*;
  localparam int NS = 20;
  localparam int SAW = $clog2(NS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, scan_start = 0, scan_valid = 0, scan_done = 0;
  cost_t scan_delta = '0, in_delta = '0, min_out, out_scaled;
  logic [SAW-1:0] scan_state = '0, min_state;
  int checks = 0, failures = 0;

  scaler #(.NS(NS)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    longint m; int ms; longint prev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    chk(min_out == 0, "clear");
    in_delta = 1234; #1 chk(out_scaled == 1234, "identity after clear");
    for (int pass = 0; pass < 6; pass++) begin
      prev = longint'(min_out);
      scan_start = 1; @(negedge clk); scan_start = 0;
      m = 64'hFFFF_FFFF; ms = 0;
      for (int j = 0; j < NS; j++) begin
        automatic longint v = ($urandom_range(0, 3) == 0) ? 64'hFFFF_FFFF : longint'($urandom_range(500, 5000));
        if (pass == 5) v = 64'hFFFF_FFFF;
        scan_valid = 1; scan_delta = cost_t'(v); scan_state = SAW'(j);
        if (v < m) begin m = v; ms = j; end
        @(negedge clk);
        chk(longint'(min_out) == prev, "min changed before scan_done");
      end
      scan_valid = 0;
      scan_done = 1; @(negedge clk); scan_done = 0;
      chk(longint'(min_out) == m, $sformatf("min %0d exp %0d", min_out, m));
      chk(int'(min_state) == ms, "min_state");
      for (int k = 0; k < 20; k++) begin
        automatic longint v = (k == 0) ? 64'hFFFF_FFFF : longint'($urandom_range(0, 10000));
        automatic longint e = (v == 64'hFFFF_FFFF) ? v : (v < m ? 0 : v - m);
        in_delta = cost_t'(v); #1;
        chk(longint'(out_scaled) == e, $sformatf("scaled %0d exp %0d", out_scaled, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
