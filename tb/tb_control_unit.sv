// tb_control_unit: drives a 3x8-pixel image (six beats of four pixels per
// frame, fewer than the 20-slot ring) with random gaps and random moment
// orders, frames back to back. A model tracks the raster position and
// checks, every cycle: in_ready (the last beat of a frame must wait while
// the previous drain would overlap), the operands each cell receives
// (coordinates, orders, pixel, with cell k k*5 cycles behind cell 0), and
// the drain controls fb_en, acc_en, acc_first and frame_done.
module tb_control_unit;
  import moment_pkg::*;
  localparam int ROWS = 3, COLS = 8, NC = 4;
  localparam int GROUPS = COLS / NC;
  localparam int LOOP = NC * MPE_LAT;
  localparam int ITER = 600;
  localparam int H = ITER + LOOP * 2;

  logic clk = 0, rst_n = 0, in_valid, in_ready;
  logic [NC-1:0][PIX_W-1:0] in_pix;
  logic [POW_W-1:0] p_cfg, q_cfg;
  cell_in_t cells [NC];
  logic fb_en, acc_en, acc_first, frame_done;
  int checks = 0, failures = 0, cyc = 0;
  int stalls = 0, frames = 0, bubbles = 0, overlaps = 0;

  cell_in_t exp_cell [H][NC];
  bit       exp_drain [H];
  bit       exp_first [H];
  bit       exp_done  [H];

  control_unit #(.IMG_ROWS(ROWS), .IMG_COLS(COLS), .N_CELLS(NC)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_pix(in_pix),
    .p_cfg(p_cfg), .q_cfg(q_cfg), .cells(cells), .fb_en(fb_en), .acc_en(acc_en),
    .acc_first(acc_first), .frame_done(frame_done));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int n, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 15) $display("FAIL cycle %0d %s: expected %0d got %0d", n, what, want, got);
    end
  endtask

  initial begin
    int row = 1, grp = 0, drain_end = -10;
    int unsigned pf = 0, qf = 0;
    for (int n = 0; n < H; n++) begin
      exp_drain[n] = 0; exp_first[n] = 0; exp_done[n] = 0;
      for (int k = 0; k < NC; k++) exp_cell[n][k] = '0;
    end
    in_valid = 0; in_pix = '0; p_cfg = '0; q_cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < ITER; n++) begin
      bit at_last, want_ready, acc;
      @(negedge clk);
      in_valid = (n < ITER - 2 * LOOP) && ($urandom_range(9) != 0);
      in_pix   = {$urandom, $urandom};
      p_cfg    = POW_W'($urandom);
      q_cfg    = POW_W'($urandom);
      #1;
      at_last    = (row == ROWS) && (grp == GROUPS - 1);
      want_ready = !(at_last && n < drain_end - 1);
      expect_eq("in_ready", n, int'(in_ready), int'(want_ready));
      if (!in_valid) bubbles++;
      if (in_valid && !want_ready) stalls++;
      if (n <= drain_end && in_valid && want_ready) overlaps++;
      // outputs of this cycle
      for (int k = 0; k < NC; k++) begin
        checks++;
        if (cells[k] !== exp_cell[n][k]) begin
          failures++;
          if (failures < 15) $display("FAIL cycle %0d cell %0d: expected %h got %h", n, k, exp_cell[n][k], cells[k]);
        end
      end
      expect_eq("fb_en", n, int'(fb_en), int'(!exp_drain[n]));
      expect_eq("acc_en", n, int'(acc_en), int'(exp_drain[n]));
      expect_eq("acc_first", n, int'(acc_first), int'(exp_first[n]));
      expect_eq("frame_done", n, int'(frame_done), int'(exp_done[n]));
      // the beat accepted at the end of this cycle
      acc = in_valid && want_ready;
      if (acc) begin
        int unsigned pu, qu;
        pu = (row == 1 && grp == 0) ? p_cfg : pf;
        qu = (row == 1 && grp == 0) ? q_cfg : qf;
        pf = pu; qf = qu;
        for (int k = 0; k < NC; k++) begin
          cell_in_t c;
          c.x = COORD_W'(row);
          c.y = COORD_W'(grp * NC + k + 1);
          c.p = POW_W'(pu);
          c.q = POW_W'(qu);
          c.pix = in_pix[k];
          exp_cell[n + 1 + k * MPE_LAT][k] = c;
        end
        if (at_last) begin
          for (int m = n + 2; m <= n + 1 + LOOP; m++) exp_drain[m] = 1;
          exp_first[n + 2] = 1;
          exp_done[n + 1 + LOOP] = 1;
          drain_end = n + 1 + LOOP;
          frames++;
        end
        if (grp == GROUPS - 1) begin
          grp = 0;
          row = (row == ROWS) ? 1 : row + 1;
        end else begin
          grp++;
        end
      end
    end
    $display("frames=%0d stalls=%0d bubbles=%0d beats during a drain=%0d", frames, stalls, bubbles, overlaps);
    expect_eq("stall seen", 0, int'(stalls > 0), 1);
    expect_eq("frames seen", 0, int'(frames > 3), 1);
    expect_eq("overlap seen", 0, int'(overlaps > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
