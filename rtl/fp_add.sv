// fp_add: adder for the unsigned 18-bit floating-point format of moment_pkg.
//
// The two operands are compared (exponent, then mantissa); the smaller
// mantissa is shifted right by the exponent difference, dropping the bits
// shifted out, and the two 10-bit mantissas are added by the carry select
// adder csa10. A carry out means the sum reached 2^10: the mantissa is shifted
// right by one (truncating) and the exponent incremented, saturating at the
// largest number. No left normalisation is needed because both operands are
// nonnegative. Compare, align and 10-bit add follow the document;
// truncation and saturation are this design's choices. Combinational.
module fp_add
  import moment_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t s
);
  fp_t              greater, lesser;
  logic [EXP_W-1:0] diff;
  logic [MAN_W-1:0] small_al;
  logic [MAN_W-1:0] msum;
  logic             mcarry;

  always_comb begin
    if (b > a) begin      // packed {e, m} compares as magnitude
      greater   = b;
      lesser = a;
    end else begin
      greater   = a;
      lesser = b;
    end
    diff     = greater.e - lesser.e;
    small_al = (diff >= EXP_W'(MAN_W)) ? '0 : lesser.m >> diff;
  end

  csa10 u_csa (.a(greater.m), .b(small_al), .cin(1'b0), .sum(msum), .cout(mcarry));

  always_comb begin
    if (greater.m == '0)       s = FP_ZERO;
    else if (!mcarry)      s = '{e: greater.e, m: msum};
    else if (greater.e == '1)  s = FP_MAX;
    else                   s = '{e: greater.e + 1'b1, m: {1'b1, msum[MAN_W-1:1]}};
  end
endmodule
