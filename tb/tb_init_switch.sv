// tb_init_switch: exhaustive check of the start-score selection over random
// scores: init + entry -> b, init + non-entry -> COST_INF, otherwise the
// fed-back score; b is always forwarded.
module tb_init_switch;
  import viterbi_pkg::*;
  logic init, is_entry;
  cost_t b_in, delta_fb, delta_out, b_out;
  int checks = 0, failures = 0;

  init_switch dut (.*);

  initial begin
    for (int n = 0; n < 200; n++) begin
      init = n[0]; is_entry = n[1];
      b_in = $urandom; delta_fb = $urandom;
      #1;
      checks += 2;
      if (delta_out != (init ? (is_entry ? b_in : COST_INF) : delta_fb)) failures++;
      if (b_out != b_in) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
