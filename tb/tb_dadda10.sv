// tb_dadda10: checks the 10x10 Dadda multiplier exhaustively against the
// integer product.
module tb_dadda10;
  logic [9:0]  a, b;
  logic [19:0] p;
  int checks = 0, failures = 0;

  dadda10 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      for (int j = 0; j < 1024; j++) begin
        a = 10'(i); b = 10'(j);
        #1;
        checks++;
        if (p !== 20'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", i, j, i * j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
