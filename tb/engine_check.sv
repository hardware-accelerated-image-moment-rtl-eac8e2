// engine_check: drives one moment_engine with NF frames of random 8-bit
// pixels and a random moment order per frame, with random gaps in the
// stream, and checks every result against a cycle-exact model.
//
// The model follows a pixel beat accepted in cycle n into ring slot
// n mod (N_CELLS*5), adds its N_CELLS terms in cell order with the
// truncating reference arithmetic, empties the slots in ring order into the
// accumulator when the frame's last beat is accepted, and expects m_valid
// exactly N_CELLS*5 + 2 cycles after that beat. It also keeps the exact
// integer moment and reports the relative error of the 18-bit result.
// Counters report how often each mechanism occurred: feedback reuse of a
// slot within a frame, drains, input stalls, stream gaps, beats accepted
// while a drain runs, and changes of moment order between frames.
module engine_check
  import moment_pkg::*;
  import moment_ref_pkg::*;
#(
  parameter int unsigned ROWS      = 8,
  parameter int unsigned COLS      = 16,
  parameter int unsigned NF        = 4,
  parameter int unsigned GAP_PCT   = 10,
  parameter real         MAX_ERR   = 0.05
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   wraps,
  output int   drains,
  output int   stalls,
  output int   gaps,
  output int   overlaps,
  output int   order_changes,
  output bit   done
);
  localparam int NC     = 4;
  localparam int LOOP   = NC * MPE_LAT;
  localparam int GROUPS = COLS / NC;

  logic                     in_valid, in_ready, m_valid, draining;
  logic [NC-1:0][PIX_W-1:0] in_pix;
  logic [POW_W-1:0]         p_cfg, q_cfg;
  fp_t                      m_value;

  moment_engine #(.IMG_ROWS(ROWS), .IMG_COLS(COLS), .N_CELLS(NC)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_pix(in_pix),
    .p_cfg(p_cfg), .q_cfg(q_cfg), .m_valid(m_valid), .m_value(m_value), .draining(draining));

  initial begin
    fp_t  slots [LOOP];
    int   hits [LOOP];
    int   row = 1, grp = 0, drain_end = -10, frame = 0, n = 0, last_p = -1, last_q = -1;
    int   due [$];
    fp_t  due_val [$];
    real  due_exact [$];
    int unsigned pf = 0, qf = 0;
    big_t exact;

    {checks, failures, wraps, drains, stalls, gaps, overlaps, order_changes} = '0;
    done = 0;
    slots = '{default: FP_ZERO};
    hits = '{default: 0};
    exact = '0;
    in_valid = 0; in_pix = '0; p_cfg = '0; q_cfg = '0;
    @(posedge rst_n);
    while (frame < int'(NF) || due.size() > 0) begin
      bit at_last, acc;
      @(negedge clk);
      in_valid = (frame < int'(NF)) && ($urandom_range(99) >= GAP_PCT);
      for (int k = 0; k < NC; k++) in_pix[k] = PIX_W'($urandom);
      p_cfg = POW_W'($urandom);
      q_cfg = POW_W'($urandom);
      #1;
      at_last = (row == int'(ROWS)) && (grp == GROUPS - 1);
      if (frame < int'(NF) && !in_valid) gaps++;
      if (in_valid && !in_ready) stalls++;
      // result due in this cycle?
      checks++;
      if (due.size() > 0 && due[0] == n) begin
        real r, rel;
        if (!m_valid || m_value !== due_val[0]) begin
          failures++;
          $display("FAIL frame result at cycle %0d: m_valid=%0d expected %h got %h", n, m_valid, due_val[0], m_value);
        end
        r = fp_to_real(m_value);
        rel = (due_exact[0] == 0.0) ? 0.0 : (r - due_exact[0]) / due_exact[0];
        if (rel < 0.0) rel = -rel;
        $display("%0dx%0d frame result %h = %e, exact %e, relative error %f", ROWS, COLS, m_value, r, due_exact[0], rel);
        checks++;
        if (rel > MAX_ERR) begin
          failures++;
          $display("FAIL relative error %f above %f", rel, MAX_ERR);
        end
        void'(due.pop_front());
        void'(due_val.pop_front());
        void'(due_exact.pop_front());
      end else if (m_valid) begin
        failures++;
        $display("FAIL unexpected m_valid at cycle %0d", n);
      end
      acc = in_valid && in_ready;
      if (acc && n <= drain_end) overlaps++;
      if (acc) begin
        int unsigned pu, qu;
        int s;
        pu = (row == 1 && grp == 0) ? p_cfg : pf;
        qu = (row == 1 && grp == 0) ? q_cfg : qf;
        pf = pu; qf = qu;
        s = n % LOOP;
        if (hits[s] > 0) wraps++;
        hits[s]++;
        for (int k = 0; k < NC; k++) begin
          slots[s] = ref_add(slots[s], ref_term(row, grp * NC + k + 1, pu, qu, in_pix[k]));
          exact += exact_term(row, grp * NC + k + 1, pu, qu, in_pix[k]);
        end
        if (at_last) begin
          fp_t m;
          m = FP_ZERO;
          for (int i = 0; i < LOOP; i++) m = ref_add(m, slots[(n + 1 + i) % LOOP]);
          due.push_back(n + 2 + LOOP);
          due_val.push_back(m);
          due_exact.push_back(big_to_real(exact));
          slots = '{default: FP_ZERO};
          hits = '{default: 0};
          exact = '0;
          drain_end = n + 1 + LOOP;
          drains++;
          if (last_p >= 0 && (int'(pu) != last_p || int'(qu) != last_q)) order_changes++;
          last_p = pu; last_q = qu;
          frame++;
        end
        if (grp == GROUPS - 1) begin
          grp = 0;
          row = (row == int'(ROWS)) ? 1 : row + 1;
        end else begin
          grp++;
        end
      end
      n++;
    end
    done = 1;
  end
endmodule
