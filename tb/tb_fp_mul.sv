// tb_fp_mul: checks the floating-point multiplier against the exact product
// cut to ten significant bits, including zero operands and saturation.
module tb_fp_mul;
  import moment_pkg::*;
  import moment_ref_pkg::*;
  fp_t a, b, p, e;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .p(p));

  task automatic check(fp_t ta, fp_t tb_);
    a = ta; b = tb_;
    #1;
    e = ref_mul(ta, tb_);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: expected %h got %h", ta, tb_, e, p);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(FP_ZERO, FP_ONE);
    check(FP_ONE, FP_ONE);
    check(FP_MAX, FP_MAX);
    check(FP_MAX, FP_ONE);
    check('{e: 8'd128, m: 10'h3ff}, '{e: 8'd127, m: 10'h3ff});
    for (int n = 0; n < 100000; n++) check(rand_fp(n % 3 == 0 ? 255 : 127), rand_fp(127));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
