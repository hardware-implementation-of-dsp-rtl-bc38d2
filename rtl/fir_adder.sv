// fir_adder - two-input adder of one transposed-form stage.
//
// Adds the product of the current tap (PROD_W bits, zero-extended) to the partial sum
// arriving from the previous delay element (W bits) and returns a W-bit sum. The
// filter sizes W so that the sum of all taps fits, so no carry is ever lost.
// Combinational; the result is registered by the next delay element.
//
// Ports: prod (PROD_W bits), acc (W bits), sum (W bits = prod + acc).
// Two inputs and one output follow the document; the widths are this design's choice.
module fir_adder #(
  parameter int unsigned PROD_W = 16,
  parameter int unsigned W      = 19
) (
  input  logic [PROD_W-1:0] prod,
  input  logic [W-1:0]      acc,
  output logic [W-1:0]      sum
);

  assign sum = W'(prod) + acc;

endmodule
