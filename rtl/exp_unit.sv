// exp_unit: pipelined power unit, x^p for p = 0..7 in a fixed three cycles.
//
// The integer x is converted to floating point and the powers are built by
// repeated squaring and products, one multiplier level per stage:
//   stage 1: x^2 = x*x
//   stage 2: x^3 = x^2*x,  x^4 = x^2*x^2
//   after stage 3: x^5 = x^4*x, x^6 = x^3*x^3, x^7 = x^4*x^3
// and a multiplexer driven by p (delayed alongside x) selects 1, x, ..., x^7.
// Every value is registered at every stage boundary so that all powers of the
// same x meet at the multiplexer. The three stages, the six multipliers and
// the final p-driven multiplexer follow the document; which operands feed
// which multiplier, the constant 1 for p = 0 and the pipelined p are this
// design's choices.
// Timing: x and p sampled at a rising edge appear as xp three edges later, as
// a combinational function of the stage-3 registers; a new x every cycle.
module exp_unit
  import moment_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] x,
  input  logic [POW_W-1:0]   p,
  output fp_t                xp
);
  fp_t x_f, sq;
  fp_t s1_x1, s1_x2;
  fp_t s2_x1, s2_x2, s2_x3, s2_x4;
  fp_t s3_x1, s3_x2, s3_x3, s3_x4;
  fp_t cube, quad, x5, x6, x7;
  logic [POW_W-1:0] s1_p, s2_p, s3_p;

  int_to_fp #(.IN_W(COORD_W)) u_cvt (.i(x), .f(x_f));

  fp_mul u_m2 (.a(x_f),   .b(x_f),   .p(sq));
  fp_mul u_m3 (.a(s1_x2), .b(s1_x1), .p(cube));
  fp_mul u_m4 (.a(s1_x2), .b(s1_x2), .p(quad));
  fp_mul u_m5 (.a(s3_x4), .b(s3_x1), .p(x5));
  fp_mul u_m6 (.a(s3_x3), .b(s3_x3), .p(x6));
  fp_mul u_m7 (.a(s3_x4), .b(s3_x3), .p(x7));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s1_x1, s1_x2, s1_p} <= '0;
      {s2_x1, s2_x2, s2_x3, s2_x4, s2_p} <= '0;
      {s3_x1, s3_x2, s3_x3, s3_x4, s3_p} <= '0;
    end else begin
      s1_x1 <= x_f;   s1_x2 <= sq;    s1_p <= p;
      s2_x1 <= s1_x1; s2_x2 <= s1_x2; s2_x3 <= cube;  s2_x4 <= quad;  s2_p <= s1_p;
      s3_x1 <= s2_x1; s3_x2 <= s2_x2; s3_x3 <= s2_x3; s3_x4 <= s2_x4; s3_p <= s2_p;
    end
  end

  always_comb begin
    unique case (s3_p)
      3'd0: xp = FP_ONE;
      3'd1: xp = s3_x1;
      3'd2: xp = s3_x2;
      3'd3: xp = s3_x3;
      3'd4: xp = s3_x4;
      3'd5: xp = x5;
      3'd6: xp = x6;
      default: xp = x7;
    endcase
  end
endmodule
