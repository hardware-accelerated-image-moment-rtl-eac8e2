// int_to_fp: converts an unsigned integer (a coordinate or a pixel value) to
// the 18-bit floating-point format of moment_pkg.
//
// A priority search finds the leading one at bit L; the exponent is L and the
// integer is shifted so that its leading one lands in mantissa bit 9 (left for
// L < 9, right with truncation for L > 9). Zero maps to zero. Integers of up
// to ten significant bits, which covers 8-bit pixels and the coordinates
// 1..1024, convert exactly. The document does not describe this converter;
// it is the simplest one for the format. Combinational. The exponent is the
// leading-one position, so for an 11-bit input its upper four bits are
// always zero.
module int_to_fp
  import moment_pkg::*;
#(
  parameter int unsigned IN_W = 11
) (
  input  logic [IN_W-1:0] i,
  output fp_t             f
);
  localparam int unsigned LW = $clog2(IN_W + 1);

  logic [LW-1:0] lead;

  always_comb begin
    lead = '0;
    for (int k = 0; k < IN_W; k++)
      if (i[k]) lead = LW'(k);
  end

  always_comb begin
    logic [IN_W+MAN_W-1:0] wide;
    wide = {i, {MAN_W{1'b0}}} >> lead;   // leading one now at bit MAN_W
    if (i == '0) f = FP_ZERO;
    else         f = '{e: EXP_W'(lead), m: MAN_W'(wide >> 1)};  // bits above are zero
  end
endmodule
