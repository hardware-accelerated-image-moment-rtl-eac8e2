// fp_mul: multiplier for the unsigned 18-bit floating-point format of
// moment_pkg.
//
// The 10-bit mantissas are multiplied by the 10x10 Dadda multiplier dadda10,
// giving a 20-bit product in [2^18, 2^20) for nonzero operands. If bit 19 is
// set the upper ten bits are kept and the exponent is Ea+Eb+1, otherwise bits
// 18:9 are kept and the exponent is Ea+Eb (value = M * 2^(E-9)). Dropped bits
// are truncated; an exponent above 255 saturates to the largest number; a zero
// operand gives zero. The Dadda mantissa multiplier follows the document; the
// exponent path and rounding are this design's. Combinational.
module fp_mul
  import moment_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t p
);
  logic [2*MAN_W-1:0] mprod;
  logic [EXP_W:0]     esum;
  logic               top;

  dadda10 #(.N(MAN_W)) u_dadda (.a(a.m), .b(b.m), .p(mprod));

  always_comb begin
    top  = mprod[2*MAN_W-1];
    esum = {1'b0, a.e} + {1'b0, b.e} + (EXP_W+1)'(top);
    if (a.m == '0 || b.m == '0) p = FP_ZERO;
    else if (esum[EXP_W])       p = FP_MAX;
    else if (top)               p = '{e: esum[EXP_W-1:0], m: mprod[2*MAN_W-1 -: MAN_W]};
    else                        p = '{e: esum[EXP_W-1:0], m: mprod[2*MAN_W-2 -: MAN_W]};
  end
endmodule
