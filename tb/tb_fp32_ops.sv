// tb_fp32_ops: checks the single-precision adder and multiplier bit for bit.
//
// Random operands over a wide exponent range, with both signs, equal and
// nearly equal magnitudes (cancellation), exact zeros and values that round
// on a tie, compared with the double-precision-then-round reference of
// fp_ref_pkg. Results that would be subnormal are expected as zero.
module tb_fp32_ops;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y_add, y_mul;
  int checks = 0, failures = 0;

  fp32_add u_add (.a(a), .b(b), .y(y_add));
  fp32_mul u_mul (.a(a), .b(b), .y(y_mul));

  function automatic logic [31:0] rnd_fp(int emin, int emax);
    logic [31:0] f;
    f = {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
    return f;
  endfunction

  task automatic chk(logic [31:0] got, logic [31:0] exp, string op);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got %h exp %h", op, a, b, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      a = rnd_fp(100, 154);
      case (n % 5)
        0: b = rnd_fp(100, 154);
        1: b = rnd_fp(int'(a[30:23]) - 3, int'(a[30:23]) + 3);
        2: b = {~a[31], a[30:23], a[22:0] ^ 23'($urandom_range(0, 7))};   // cancellation
        3: b = {($urandom_range(0, 1) == 1) ? a[31] : ~a[31], a[30:0]};          // exact 0 or 2a
        default: b = (n % 10 == 4) ? 32'd0 : {1'($urandom), 8'(int'(a[30:23]) - 24), 23'($urandom_range(0, 3)) << 20};
      endcase
      #1;
      chk(y_add, r2f(f2r(a) + f2r(b)), "add");
      chk(y_mul, r2f(f2r(a) * f2r(b)), "mul");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
