// tb_mpe: streams random pixels, coordinates, powers and previous-moment
// values into one moment processor element, one per cycle, and checks that
// sum equals previous + x^p*y^q*f exactly MPE_LAT (5) cycles later.
module tb_mpe;
  import moment_pkg::*;
  import moment_ref_pkg::*;
  localparam int N = 5000;

  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] x, y;
  logic [POW_W-1:0]   p, q;
  logic [PIX_W-1:0]   pix;
  fp_t prev, sum;
  int checks = 0, failures = 0, cyc = 0;
  int unsigned xs [N], ys [N], pps [N], qs [N], fs [N];
  fp_t prevs [N];

  mpe dut (.clk(clk), .rst_n(rst_n), .x(x), .p(p), .y(y), .q(q), .pix(pix), .prev(prev), .sum(sum));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) begin
      xs[n] = $urandom_range(1024, 1);
      ys[n] = $urandom_range(1024, 1);
      pps[n] = $urandom_range(7);
      qs[n] = $urandom_range(7);
      fs[n] = (n % 10 == 3) ? 0 : $urandom_range(255);
      prevs[n] = rand_fp(n % 2 ? 200 : 60);
    end
    {x, y, p, q, pix} = '0;
    prev = FP_ZERO;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N + MPE_LAT - 1; n++) begin
      @(negedge clk);
      if (n < N) begin
        x = COORD_W'(xs[n]); y = COORD_W'(ys[n]); p = POW_W'(pps[n]); q = POW_W'(qs[n]);
        pix = PIX_W'(fs[n]); prev = prevs[n];
      end else begin
        pix = '0; prev = FP_ZERO;
      end
      @(posedge clk);
      #1;
      if (n >= MPE_LAT - 1) begin
        int k;
        fp_t e;
        k = n - (MPE_LAT - 1);  // five register stages: the sampling edge plus four
        e = ref_add(prevs[k], ref_term(xs[k], ys[k], pps[k], qs[k], fs[k]));
        checks++;
        if (sum !== e) begin
          failures++;
          if (failures < 10) $display("FAIL item %0d expected %h got %h", k, e, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
