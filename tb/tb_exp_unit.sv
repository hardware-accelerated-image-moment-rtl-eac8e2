// tb_exp_unit: streams a new (x, p) into the power unit every cycle and
// checks that x^p appears after three register stages (two edges after the sampling edge), for every p = 0..7
// and coordinates 1..1024 (including the exact powers 1 and 1024).
module tb_exp_unit;
  import moment_pkg::*;
  import moment_ref_pkg::*;
  localparam int LAT = 3;
  localparam int N   = 20000;

  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] x;
  logic [POW_W-1:0]   p;
  fp_t xp;
  int checks = 0, failures = 0, cyc = 0;
  int unsigned xs [N + LAT];
  int unsigned ps [N + LAT];

  exp_unit dut (.clk(clk), .rst_n(rst_n), .x(x), .p(p), .xp(xp));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N + LAT; n++) begin
      xs[n] = (n < 16) ? ((n % 2 == 0) ? 1 : 1024) : $urandom_range(1024, 1);
      ps[n] = n % 8;
    end
    x = '0; p = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      x = COORD_W'(xs[n]);
      p = POW_W'(ps[n]);
      @(posedge clk);
      #1;
      // three register stages: input n-2 has passed the sampling edge and two more
      if (n >= LAT - 1) begin
        fp_t e;
        e = ref_pow(xs[n-LAT+1], ps[n-LAT+1]);
        checks++;
        if (xp !== e) begin
          failures++;
          if (failures < 10) $display("FAIL %0d^%0d expected %h got %h", xs[n-LAT+1], ps[n-LAT+1], e, xp);
        end
      end
    end
    // 1024^7 = 2^70 is exact
    checks++;
    if (ref_pow(1024, 7) !== {8'd70, 10'h200}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
