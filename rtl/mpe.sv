// mpe: moment processor element, one cell of the systolic array.
//
// For the pixel f(x,y) it forms the term x^p * y^q * f(x,y) and adds it to
// the partial moment arriving from the previous cell ("previous moment
// data"). Two exp_unit instances raise x and y to their powers (3 cycles);
// the pixel is delayed three registers to meet y^q; y^q*f and the registered
// x^p are captured in stage 4; their product is captured in stage 5; the
// previous moment, delayed five registers, is added to it by fp_add.
// Timing: a pixel presented together with a previous moment value at one
// edge contributes to sum five edges later (MPE_LAT); sum is combinational
// from registers, so a chain of cells has no combinational path between
// cells. One pixel per cycle. A pixel of 0 adds nothing, which marks an empty
// slot. The register layout (three on the pixel, five on the previous
// moment, one after x^p) follows the document; the registers after the two
// products are this design's, to line the term up with the five-register
// path.
module mpe
  import moment_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] x,
  input  logic [POW_W-1:0]   p,
  input  logic [COORD_W-1:0] y,
  input  logic [POW_W-1:0]   q,
  input  logic [PIX_W-1:0]   pix,
  input  fp_t                prev,
  output fp_t                sum
);
  fp_t              xp, yq, f_fp, yqf, term;
  fp_t              xp_r, yqf_r, term_r;
  logic [PIX_W-1:0] pix_d [3];
  fp_t              prev_d [MPE_LAT];

  exp_unit u_expx (.clk(clk), .rst_n(rst_n), .x(x), .p(p), .xp(xp));
  exp_unit u_expy (.clk(clk), .rst_n(rst_n), .x(y), .p(q), .xp(yq));

  int_to_fp #(.IN_W(PIX_W)) u_cvt (.i(pix_d[2]), .f(f_fp));

  fp_mul u_myf (.a(yq),   .b(f_fp),  .p(yqf));
  fp_mul u_mxt (.a(xp_r), .b(yqf_r), .p(term));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_d  <= '{default: '0};
      prev_d <= '{default: FP_ZERO};
      xp_r   <= FP_ZERO;
      yqf_r  <= FP_ZERO;
      term_r <= FP_ZERO;
    end else begin
      pix_d[0] <= pix;
      for (int k = 1; k < 3; k++) pix_d[k] <= pix_d[k-1];
      prev_d[0] <= prev;
      for (int k = 1; k < MPE_LAT; k++) prev_d[k] <= prev_d[k-1];
      xp_r   <= xp;
      yqf_r  <= yqf;
      term_r <= term;
    end
  end

  fp_add u_add (.a(prev_d[MPE_LAT-1]), .b(term_r), .s(sum));
endmodule
