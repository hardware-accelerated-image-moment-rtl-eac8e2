// moment_accumulator: the final adder of the array, which adds its input to
// the value it stored the cycle before.
//
// When en is high the stored value becomes acc + din, or din alone when
// first is also high (the start of a new moment). When en is low it holds.
// The control unit enables it for the N_CELLS*MPE_LAT cycles after a frame's
// last pixel, while the ring's partial sums come out of the last cell one per
// cycle, so acc then holds the frame's moment. The adder with its feedback
// register follows the document; first/en are this design's. One addition per
// cycle; acc is updated at the edge that samples en.
module moment_accumulator
  import moment_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic first,
  input  fp_t  din,
  output fp_t  acc
);
  fp_t base, nxt;

  assign base = first ? FP_ZERO : acc;
  fp_add u_add (.a(base), .b(din), .s(nxt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= FP_ZERO;
    else if (en) acc <= nxt;
  end
endmodule
