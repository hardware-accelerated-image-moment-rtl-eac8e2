// systolic_array: N_CELLS moment processor elements in a ring.
//
// The partial moment travels MPE1 -> MPE2 -> ... -> MPEn, each cell adding
// the term of its own pixel, and the output of the last cell is fed back to
// the first. The ring is N_CELLS*MPE_LAT cycles long (20 for four cells), so
// it holds that many independent partial sums, one per cycle slot; every
// slot keeps collecting terms until the feedback is cut. The caller must
// present cell k's operands k*MPE_LAT cycles after cell 0's so that they meet
// the partial sum they belong to (control_unit does this).
// With fb_en low the first cell receives zero instead of the fed-back value;
// this is how the ring is emptied, into chain_out, at the end of a frame.
// The ring of cells with last-to-first feedback follows the document; the
// fb_en control is this design's.
module systolic_array
  import moment_pkg::*;
#(
  parameter int unsigned N_CELLS = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cell_in_t cin [N_CELLS],
  input  logic     fb_en,
  output fp_t      chain_out
);
  fp_t feed;

  for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
    fp_t prev, sum;
    if (k == 0) begin : g_first
      assign prev = feed;
    end else begin : g_next
      assign prev = g_cell[k-1].sum;
    end
    mpe u_mpe (.clk(clk), .rst_n(rst_n),
               .x(cin[k].x), .p(cin[k].p), .y(cin[k].y), .q(cin[k].q), .pix(cin[k].pix),
               .prev(prev), .sum(sum));
  end

  assign chain_out = g_cell[N_CELLS-1].sum;
  assign feed      = fb_en ? chain_out : FP_ZERO;
endmodule
