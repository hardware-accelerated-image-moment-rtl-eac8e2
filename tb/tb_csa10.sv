// tb_csa10: checks the 10-bit carry select adder against the integer sum
// a + b + cin for all carry-in values over corner cases and random operands.
module tb_csa10;
  logic [9:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  csa10 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(logic [9:0] ta, logic [9:0] tb_, logic tc);
    logic [10:0] exp_s;
    a = ta; b = tb_; cin = tc;
    #1;
    exp_s = 11'(ta) + 11'(tb_) + 11'(tc);
    checks++;
    if ({cout, sum} !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d, got %0d", ta, tb_, tc, exp_s, {cout, sum});
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // carry chains through every block boundary
    for (int k = 0; k < 10; k++) begin
      check(10'((1 << k) - 1), 10'd1, 1'b0);
      check(10'((1 << k) - 1), 10'd0, 1'b1);
      check(10'h3ff, 10'(1 << k), 1'b0);
    end
    check(10'h3ff, 10'h3ff, 1'b1);
    check(10'h000, 10'h000, 1'b0);
    for (int n = 0; n < 200000; n++) check(10'($urandom), 10'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
