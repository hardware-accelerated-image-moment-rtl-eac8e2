// tb_systolic_array: drives the four-cell ring directly, with the skew the
// control unit would apply (cell k gets its operands k*5 cycles after cell
// 0), for two frames of 50 beats (more than the 20-slot ring, so every slot
// goes round the feedback loop more than once), the second frame starting in
// the cycle after the first one's last beat. After each frame the feedback is
// cut for 20 cycles and every value leaving the last cell is checked against
// a model of the 20 circulating partial sums. The second frame uses lower
// orders than the first, so any value of the first left in the ring shows.
module tb_systolic_array;
  import moment_pkg::*;
  import moment_ref_pkg::*;
  localparam int NC    = 4;
  localparam int LOOP  = NC * MPE_LAT;
  localparam int NB    = 50;              // beats per frame
  localparam int NF    = 2;
  localparam int TOTAL = NF * NB + LOOP + 4 * MPE_LAT;

  logic clk = 0, rst_n = 0, fb_en;
  cell_in_t cin [NC];
  fp_t chain_out;
  int checks = 0, failures = 0, cyc = 0, wraps = 0;

  cell_in_t beat   [TOTAL][NC];
  fp_t      exp_out[TOTAL];
  bit       exp_chk[TOTAL];
  bit       fb     [TOTAL];

  systolic_array #(.N_CELLS(NC)) dut (.clk(clk), .rst_n(rst_n), .cin(cin), .fb_en(fb_en), .chain_out(chain_out));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp_t slots [LOOP];
    fp_t drained [LOOP];
    int  slot_hits [LOOP];
    int  drain_end;
    // stimulus and model
    slots = '{default: FP_ZERO};
    slot_hits = '{default: 0};
    drain_end = -1;
    for (int n = 0; n < TOTAL; n++) begin
      exp_chk[n] = 0;
      fb[n] = !(n <= drain_end);
      if (n <= drain_end) begin
        exp_chk[n] = 1;
        exp_out[n] = drained[n % LOOP];
      end
      for (int k = 0; k < NC; k++) beat[n][k] = '0;
      if (n < NF * NB) begin
        int unsigned px, pp, pq;
        px = $urandom_range(64, 1);
        pp = (n < NB) ? 7 : 2;
        pq = (n < NB) ? 5 : 3;
        for (int k = 0; k < NC; k++) begin
          beat[n][k].x   = COORD_W'(px);
          beat[n][k].y   = COORD_W'($urandom_range(64, 1));
          beat[n][k].p   = POW_W'(pp);
          beat[n][k].q   = POW_W'(pq);
          beat[n][k].pix = ($urandom_range(7) == 0) ? '0 : PIX_W'($urandom_range(255));
        end
        if (slot_hits[n % LOOP] > 0) wraps++;
        slot_hits[n % LOOP]++;
        for (int k = 0; k < NC; k++)
          slots[n % LOOP] = ref_add(slots[n % LOOP],
                                    ref_term(beat[n][k].x, beat[n][k].y, beat[n][k].p, beat[n][k].q, beat[n][k].pix));
        if (n % NB == NB - 1) begin
          drained   = slots;
          slots     = '{default: FP_ZERO};
          slot_hits = '{default: 0};
          drain_end = n + LOOP;
        end
      end
    end

    for (int k = 0; k < NC; k++) cin[k] = '0;
    fb_en = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < TOTAL; n++) begin
      @(negedge clk);
      for (int k = 0; k < NC; k++) cin[k] = (n - k * int'(MPE_LAT) >= 0) ? beat[n - k * int'(MPE_LAT)][k] : '0;
      fb_en = fb[n];
      #1;
      if (exp_chk[n]) begin
        checks++;
        if (chain_out !== exp_out[n]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d expected %h got %h", n, exp_out[n], chain_out);
        end
      end
    end
    // every slot must have gone round the ring at least once
    checks++;
    if (wraps == 0) failures++;
    $display("feedback reuses of a slot: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
