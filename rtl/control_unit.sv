// control_unit: feeds the systolic array from a raster-scan camera stream and
// sequences the end of each frame.
//
// Input: beats of N_CELLS horizontally adjacent pixels, in raster order (row
// x = 1..IMG_ROWS, within a row the columns 1..IMG_COLS, N_CELLS at a time),
// with a valid/ready handshake. Pixel j of a beat belongs to column
// y = N_CELLS*g + j + 1 of group g and goes to cell j, so cell 1 sees columns
// 1, 5, 9, ... and cell 4 columns 4, 8, 12, ... The unit counts rows and
// column groups, attaches x, y and the moment order (p_cfg/q_cfg, sampled at
// the first beat of a frame and held to its end) to every pixel, registers
// the beat once and delays cell k's operands by another k*MPE_LAT cycles, so
// that each cell meets the partial sum its left neighbour passed on. A cycle
// without a beat feeds zero pixels.
// End of frame: the cycle after the last beat has entered cell 0, the ring
// feedback is cut for N_CELLS*MPE_LAT cycles (fb_en low) and the accumulator
// is enabled for the same cycles (acc_en, acc_first on the first of them),
// which empties every partial sum of the frame into it; frame_done marks the
// last of these cycles. The next frame may stream in meanwhile: its slots
// start from zero while the feedback is cut. Only its last beat is held back
// (in_ready low) while a drain that would overlap its own is still running.
// The document only says that the control unit hands each cell f(x,y), x and
// y; the stream format, the skew, the drain and the stall are this design's.
module control_unit
  import moment_pkg::*;
#(
  parameter int unsigned IMG_ROWS = 1024,
  parameter int unsigned IMG_COLS = 1024,
  parameter int unsigned N_CELLS  = 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [N_CELLS-1:0][PIX_W-1:0]   in_pix,
  input  logic [POW_W-1:0]                p_cfg,
  input  logic [POW_W-1:0]                q_cfg,
  output cell_in_t                        cells [N_CELLS],
  output logic                            fb_en,
  output logic                            acc_en,
  output logic                            acc_first,
  output logic                            frame_done
);
  localparam int unsigned GROUPS = IMG_COLS / N_CELLS;
  localparam int unsigned LOOP   = N_CELLS * MPE_LAT;
  localparam int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1;
  localparam int unsigned CW     = $clog2(LOOP + 1);

  logic [COORD_W-1:0] row;
  logic [GW-1:0]      grp;
  logic [POW_W-1:0]   p_frame, q_frame, p_use, q_use;
  logic               is_first, is_last, accept, pend;
  logic [CW-1:0]      drain_cnt;
  cell_in_t           s0 [N_CELLS];

  assign is_first = (row == COORD_W'(1)) && (grp == '0);
  assign is_last  = (row == COORD_W'(IMG_ROWS)) && (grp == GW'(GROUPS - 1));
  assign in_ready = !(is_last && (pend || drain_cnt > CW'(2)));
  assign accept   = in_valid && in_ready;
  assign p_use    = is_first ? p_cfg : p_frame;
  assign q_use    = is_first ? q_cfg : q_frame;

  // position in the frame and frame-constant moment order
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row     <= COORD_W'(1);
      grp     <= '0;
      p_frame <= '0;
      q_frame <= '0;
    end else if (accept) begin
      p_frame <= p_use;
      q_frame <= q_use;
      if (grp == GW'(GROUPS - 1)) begin
        grp <= '0;
        row <= is_last ? COORD_W'(1) : row + 1'b1;
      end else begin
        grp <= grp + 1'b1;
      end
    end
  end

  // beat register, shared by all cells
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= '{default: '0};
    end else begin
      for (int j = 0; j < N_CELLS; j++) begin
        if (accept) begin
          s0[j].x   <= row;
          s0[j].y   <= COORD_W'(grp) * COORD_W'(N_CELLS) + COORD_W'(j + 1);
          s0[j].p   <= p_use;
          s0[j].q   <= q_use;
          s0[j].pix <= in_pix[j];
        end else begin
          s0[j] <= '0;
        end
      end
    end
  end

  // skew: cell k sees the beat k*MPE_LAT cycles after cell 0
  for (genvar k = 0; k < N_CELLS; k++) begin : g_skew
    if (k == 0) begin : g_none
      assign cells[k] = s0[k];
    end else begin : g_dly
      localparam int unsigned D = k * MPE_LAT;
      cell_in_t sh [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          sh <= '{default: '0};
        end else begin
          sh[0] <= s0[k];
          for (int i = 1; i < D; i++) sh[i] <= sh[i-1];
        end
      end
      assign cells[k] = sh[D-1];
    end
  end

  // end-of-frame drain of the ring into the accumulator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= 1'b0;
      drain_cnt <= '0;
    end else begin
      pend <= accept && is_last;
      // a drain never starts while another is still running
      if (pend) assert (drain_cnt <= CW'(1)) else $error("overlapping drains");
      if (pend)                 drain_cnt <= CW'(LOOP);
      else if (drain_cnt != '0) drain_cnt <= drain_cnt - 1'b1;
    end
  end

  assign fb_en      = (drain_cnt == '0);
  assign acc_en     = (drain_cnt != '0);
  assign acc_first  = (drain_cnt == CW'(LOOP));
  assign frame_done = (drain_cnt == CW'(1));

  initial begin
    assert (IMG_COLS % N_CELLS == 0) else $error("IMG_COLS must be a multiple of N_CELLS");
    assert (IMG_ROWS < 2**COORD_W && IMG_COLS < 2**COORD_W) else $error("image too large for COORD_W");
  end
endmodule
