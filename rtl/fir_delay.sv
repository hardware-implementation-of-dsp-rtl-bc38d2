// fir_delay - one-sample delay element (z^-1) of the filter.
//
// A W-bit register that loads d when en is high, i.e. once per input sample, and
// holds its value otherwise. A synchronous active-high reset clears it, so that the
// filter starts from an all-zero history.
//
// Ports: clk, rst (synchronous, active high), en (sample strobe), d, q.
// Timing: q shows d one clock after a cycle with en = 1.
// The delay element follows the document; the enable and the synchronous reset are
// this design's choice.
module fir_delay #(
  parameter int unsigned W = 19
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
