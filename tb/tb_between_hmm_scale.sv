// tb_between_hmm_scale: checks that the best model-exit score is reduced by
// the frame minimum, clamps at zero and keeps COST_INF.
module tb_between_hmm_scale;
  import viterbi_pkg::*;
  cost_t best_cost, frame_min, scaled_cost;
  int checks = 0, failures = 0;
  longint e;

  between_hmm_scale dut (.*);

  initial begin
    for (int n = 0; n < 300; n++) begin
      frame_min = $urandom_range(0, 100000);
      best_cost = (n % 10 == 0) ? COST_INF : cost_t'($urandom_range(0, 200000));
      #1;
      if (best_cost == COST_INF) e = 64'hFFFF_FFFF;
      else if (best_cost < frame_min) e = 0;
      else e = longint'(best_cost) - longint'(frame_min);
      checks++;
      if (longint'(scaled_cost) != e) begin
        failures++; $display("FAIL %0d - %0d = %0d", best_cost, frame_min, scaled_cost);
      end
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
