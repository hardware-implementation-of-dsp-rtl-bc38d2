// fir_mult - coefficient multiplier (gain element) of one filter tap.
//
// Multiplies an unsigned input sample by an unsigned coefficient and returns the
// full-precision product, so no rounding happens inside a tap. It is purely
// combinational: the product of the current sample is ready in the same cycle and is
// registered downstream by the delay chain of the filter.
//
// Ports: a (A_W bits, sample x(n)), b (B_W bits, coefficient h(i)),
//        p (A_W+B_W bits, a*b).
// The multiplier as a building block follows the document; unsigned operands and
// full-width products are this design's choice.
module fir_mult #(
  parameter int unsigned A_W = 8,
  parameter int unsigned B_W = 8
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);

  assign p = (A_W+B_W)'(a) * (A_W+B_W)'(b);

endmodule
