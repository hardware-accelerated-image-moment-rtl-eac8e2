// csa10: 10-bit carry select adder.
//
// The operand is cut into blocks of 1, 1, 2, 3 and 3 bits (bit 0, bit 1,
// bits 3:2, bits 6:4, bits 9:7). Each block is added twice by a ripple chain
// of full adders, once assuming a carry-in of 0 and once of 1, and a 2:1
// multiplexer picks the right sum and carry as soon as the carry of the block
// below is known. Bit 0 is duplicated as well and selected by cin, so the
// critical path is one ripple block plus four multiplexers. The block sizes
// and the duplicated bit 0 follow the document; the block widths are
// fixed by this structure, so the width parameter W exists only for
// documentation and must stay 10. Combinational.
module csa10 #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NBLK = 5;
  localparam int unsigned LO [NBLK] = '{0, 1, 2, 4, 7};
  localparam int unsigned WD [NBLK] = '{1, 1, 2, 3, 3};

  logic [NBLK:0] c;   // carry into each block
  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic [WD[k]-1:0] s0, s1;
    logic             c0, c1;
    ripple_adder #(.W(WD[k])) u_r0 (.a(a[LO[k] +: WD[k]]), .b(b[LO[k] +: WD[k]]), .ci(1'b0), .s(s0), .co(c0));
    ripple_adder #(.W(WD[k])) u_r1 (.a(a[LO[k] +: WD[k]]), .b(b[LO[k] +: WD[k]]), .ci(1'b1), .s(s1), .co(c1));
    assign sum[LO[k] +: WD[k]] = c[k] ? s1 : s0;
    assign c[k+1]              = c[k] ? c1 : c0;
  end

  assign cout = c[NBLK];

  initial assert (W == 10) else $error("csa10: block partition is fixed for W = 10");
endmodule
