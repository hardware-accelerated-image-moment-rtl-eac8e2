// tb_moment_accumulator: drives random en/first/din sequences and checks the
// stored value after every edge against a model: hold, restart with din, or
// add din.
module tb_moment_accumulator;
  import moment_pkg::*;
  import moment_ref_pkg::*;
  logic clk = 0, rst_n = 0, en, first;
  fp_t din, acc, model;
  int checks = 0, failures = 0, cyc = 0, adds = 0;

  moment_accumulator dut (.clk(clk), .rst_n(rst_n), .en(en), .first(first), .din(din), .acc(acc));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; first = 0; din = FP_ZERO; model = FP_ZERO;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      first = ($urandom_range(19) == 0);
      din = rand_fp(40);
      @(posedge clk);
      if (en) begin
        model = ref_add(first ? FP_ZERO : model, din);
        adds++;
      end
      #1;
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d expected %h got %h", n, model, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
