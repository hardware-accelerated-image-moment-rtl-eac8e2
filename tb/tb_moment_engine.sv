// tb_moment_engine: end-to-end test of the moment engine at reduced image
// sizes. Two engines run side by side: a 16x16 image (64 beats per frame,
// more than the 20-slot ring, so partial sums go round the feedback loop)
// and a 2x8 image (4 beats per frame, so frames pile up and the last beat of
// a frame must wait for the previous drain). Each runs several frames back
// to back with random gaps and random moment orders; every result is checked
// bit for bit against a cycle-exact model and for its error against the
// exact moment. Each mechanism must have occurred at least once.
module tb_moment_engine;
  logic clk = 0, rst_n = 0;
  int cyc = 0;
  int c0, f0, w0, d0, s0, g0, o0, r0;
  int c1, f1, w1, d1, s1, g1, o1, r1;
  bit done0, done1;
  int checks, failures;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  engine_check #(.ROWS(16), .COLS(16), .NF(6), .GAP_PCT(10), .MAX_ERR(0.05)) u_big (
    .clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .wraps(w0), .drains(d0), .stalls(s0),
    .gaps(g0), .overlaps(o0), .order_changes(r0), .done(done0));

  engine_check #(.ROWS(2), .COLS(8), .NF(12), .GAP_PCT(5), .MAX_ERR(0.05)) u_small (
    .clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .wraps(w1), .drains(d1), .stalls(s1),
    .gaps(g1), .overlaps(o1), .order_changes(r1), .done(done1));

  task automatic need(string what, int count);
    checks++;
    $display("%s: %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    wait (cyc == 200000);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done0 && done1);
    checks = c0 + c1;
    failures = f0 + f1;
    need("feedback reuse of a ring slot", w0 + w1);
    need("end-of-frame drains", d0 + d1);
    need("input stalls", s0 + s1);
    need("stream gaps", g0 + g1);
    need("beats accepted during a drain", o0 + o1);
    need("moment order changes", r0 + r1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
