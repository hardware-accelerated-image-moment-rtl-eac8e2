// tb_int_to_fp: checks the integer to floating-point converter for every
// 11-bit input: exact up to 1024, truncated to ten significant bits above.
module tb_int_to_fp;
  import moment_pkg::*;
  import moment_ref_pkg::*;
  logic [10:0] i;
  fp_t f, e;
  int checks = 0, failures = 0;

  int_to_fp #(.IN_W(11)) dut (.i(i), .f(f));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2048; n++) begin
      i = 11'(n);
      #1;
      e = ref_int(n);
      checks++;
      if (f !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: expected %h got %h", n, e, f);
      end
      // exactness for the coordinate range
      if (n <= 1024) begin
        checks++;
        if (fp_to_real(f) != real'(n)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
