// tb_moment_engine_full: the moment engine at its default size (1024x1024
// 8-bit images, four cells) computing two frames back to back:
//   frame 1: every pixel 255, p = q = 7, the largest 14th-order moment
//            (exactly 5.8688e48);
//   frame 2: random pixels with random gaps in the stream, p = 3, q = 5.
// Each result is compared bit for bit with a cycle-exact model of the ring
// slots and the truncating arithmetic (kept here in a compact 64-bit form
// so a whole frame is quick to model), and must arrive exactly
// N_CELLS*5 + 2 cycles after the frame's last beat. The exact integer moment
// and the relative error of the 18-bit result are reported, not checked:
// with ten mantissa bits a sum of a million terms loses the small terms once
// the partial sums are large.
module tb_moment_engine_full;
  import moment_pkg::*;
  import moment_ref_pkg::*;
  localparam int ROWS = 1024, COLS = 1024, NC = 4;
  localparam int LOOP = NC * MPE_LAT;
  localparam int GROUPS = COLS / NC;

  logic clk = 0, rst_n = 0, in_valid, in_ready, m_valid, draining;
  logic [NC-1:0][PIX_W-1:0] in_pix;
  logic [POW_W-1:0] p_cfg, q_cfg;
  fp_t m_value;
  int checks = 0, failures = 0;
  longint cyc = 0;

  moment_engine dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_pix(in_pix),
    .p_cfg(p_cfg), .q_cfg(q_cfg), .m_valid(m_valid), .m_value(m_value), .draining(draining));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 3_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int msb(longint unsigned v);
    int l = -1;
    for (int k = 0; k < 64; k++) if (v[k]) l = k;
    return l;
  endfunction

  // trunc10 of S * 2^sh for S > 0
  function automatic fp_t pack(longint unsigned s, int sh);
    int l, e;
    l = msb(s);
    e = sh + l;
    if (e > 255) return FP_MAX;
    return '{e: 8'(e), m: 10'(s >> (l - 9))};
  endfunction

  function automatic fp_t fast_add(fp_t a, fp_t b);
    fp_t hi, lo;
    int d;
    if (a.m == 0) return b;
    if (b.m == 0) return a;
    if ({a.e, a.m} >= {b.e, b.m}) begin hi = a; lo = b; end else begin hi = b; lo = a; end
    d = int'(hi.e) - int'(lo.e);
    if (d > 20) return hi;
    return pack((longint'(hi.m) << d) + longint'(lo.m), int'(lo.e) - 9);
  endfunction

  function automatic fp_t fast_mul(fp_t a, fp_t b);
    if (a.m == 0 || b.m == 0) return FP_ZERO;
    return pack(longint'(a.m) * longint'(b.m), int'(a.e) + int'(b.e) - 18);
  endfunction

  task automatic run_frame(int unsigned p, int unsigned q, bit all_max, int gap_pct);
    fp_t xpow [1:ROWS];
    fp_t ypow [1:COLS];
    fp_t fint [256];
    fp_t slots [LOOP];
    fp_t expect_m;
    big_t exact, rowsum;
    longint n0, t_last;
    real r, ex;
    for (int i = 1; i <= ROWS; i++) xpow[i] = ref_pow(i, p);
    for (int i = 1; i <= COLS; i++) ypow[i] = ref_pow(i, q);
    for (int i = 0; i < 256; i++) fint[i] = ref_int(i);
    slots = '{default: FP_ZERO};
    exact = '0;
    n0 = cyc;
    for (int row = 1; row <= ROWS; row++) begin
      rowsum = '0;
      for (int g = 0; g < GROUPS; g++) begin
        // optional gap cycles
        while (gap_pct > 0 && $urandom_range(99) < gap_pct) begin
          @(negedge clk);
          in_valid = 0;
          @(posedge clk);
        end
        @(negedge clk);
        in_valid = 1;
        p_cfg = POW_W'(p);
        q_cfg = POW_W'(q);
        for (int k = 0; k < NC; k++) in_pix[k] = all_max ? 8'hff : PIX_W'($urandom);
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        begin
          int s;
          s = int'(cyc % LOOP);
          for (int k = 0; k < NC; k++) begin
            int y;
            y = g * NC + k + 1;
            slots[s] = fast_add(slots[s], fast_mul(xpow[row], fast_mul(ypow[y], fint[in_pix[k]])));
            rowsum += exact_term(1, y, 0, q, in_pix[k]);
          end
        end
        t_last = cyc;
        @(posedge clk);
      end
      exact += rowsum * exact_term(row, 1, p, 0, 1);
    end
    @(negedge clk);
    in_valid = 0;
    expect_m = FP_ZERO;
    for (int i = 0; i < LOOP; i++) expect_m = fast_add(expect_m, slots[(t_last + 1 + i) % LOOP]);
    // result: N_CELLS*5 + 2 cycles after the cycle of the last beat
    wait (m_valid);
    #1;
    checks++;
    if (cyc - t_last != LOOP + 2) begin
      failures++;
      $display("FAIL result after %0d cycles, expected %0d", cyc - t_last, LOOP + 2);
    end
    checks++;
    if (m_value !== expect_m) begin
      failures++;
      $display("FAIL M%0d%0d expected %h got %h", p, q, expect_m, m_value);
    end
    r = fp_to_real(m_value);
    ex = big_to_real(exact);
    $display("M%0d%0d of a %0dx%0d frame (%s): %h = %e, exact %e, relative error %f, %0d cycles",
             p, q, ROWS, COLS, all_max ? "all 255" : "random", m_value, r, ex, (ex - r) / ex, cyc - n0);
    @(posedge clk);
  endtask

  initial begin
    in_valid = 0; in_pix = '0; p_cfg = '0; q_cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(7, 7, 1'b1, 0);
    run_frame(3, 5, 1'b0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
