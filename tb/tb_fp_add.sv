// tb_fp_add: checks the floating-point adder against the exact sum cut to
// ten significant bits, over random operands of every exponent distance,
// zeros, equal operands and saturation at the top of the range.
module tb_fp_add;
  import moment_pkg::*;
  import moment_ref_pkg::*;
  fp_t a, b, s, e;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .s(s));

  task automatic check(fp_t ta, fp_t tb_);
    a = ta; b = tb_;
    #1;
    e = ref_add(ta, tb_);
    checks++;
    if (s !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h: expected %h got %h", ta, tb_, e, s);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(FP_ZERO, FP_ZERO);
    check(FP_ONE, FP_ZERO);
    check(FP_ZERO, FP_ONE);
    check(FP_ONE, FP_ONE);
    check(FP_MAX, FP_MAX);
    check(FP_MAX, FP_ONE);
    for (int n = 0; n < 100000; n++) begin
      fp_t x, y;
      x = rand_fp(255);
      y = rand_fp(255);
      // bias half of the pairs to close exponents, where the shifter matters
      if (n % 2 == 0 && x.m != 0 && y.m != 0) y.e = 8'(int'(x.e) + $urandom_range(12) > 255 ? 255 : int'(x.e) + $urandom_range(12));
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
