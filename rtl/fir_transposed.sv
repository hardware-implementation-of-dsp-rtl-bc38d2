// fir_transposed - transposed-form FIR filter, y(n) = sum_{i=0}^{NTAPS-1} h(i) x(n-i).
//
// How it works: every coefficient multiplies the *current* input sample at once (one
// fir_mult per tap). The products are summed along a chain of delay elements that
// runs from the highest-index coefficient towards the output:
//   z(NTAPS-1) <= h(NTAPS-1) * x
//   z(i)       <= h(i) * x + z(i+1)        for i = NTAPS-2 .. 1
//   y          <= h(0) * x + z(1)
// so each delay element holds the part of a future output that the past samples have
// already contributed. The critical path is one multiplier and one adder, whatever
// the number of taps. NTAPS multipliers, NTAPS-1 adders and NTAPS-1 delay elements
// make up the structure; one further register holds the output.
//
// Interface: in_valid marks a new input sample x (one clock per sample, any spacing);
// coef holds h(0) .. h(NTAPS-1) and is read whenever a sample is taken, so it may be
// changed between samples (e.g. to switch between filter responses).
// Timing: y and out_valid appear one clock after the cycle with in_valid = 1, and y
// holds its value until the next sample. Unsigned arithmetic, full precision.
//
// The structure (one multiplier per coefficient, adder and z^-1 chain towards the
// output) follows the document. The output register, the sample strobe, the
// synchronous reset and unsigned full-precision arithmetic are this design's choices.
module fir_transposed #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned NTAPS  = 8,
  parameter int unsigned ACC_W  = DATA_W + COEF_W + $clog2(NTAPS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] x,
  input  logic [COEF_W-1:0] coef [NTAPS],
  output logic              out_valid,
  output logic [ACC_W-1:0]  y
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic [PROD_W-1:0] prod [NTAPS];   // h(i) * x(n)
  logic [ACC_W-1:0]  z    [NTAPS];   // z(i): delay element outputs, z(0) unused
  logic [ACC_W-1:0]  sum  [NTAPS];   // sum(i) = prod(i) + z(i+1)

  for (genvar i = 0; i < NTAPS; i++) begin : g_tap
    fir_mult #(.A_W(DATA_W), .B_W(COEF_W)) u_mult (
      .a (x),
      .b (coef[i]),
      .p (prod[i])
    );

    if (i == NTAPS - 1) begin : g_last
      // The far end of the chain has nothing to add.
      assign sum[i] = ACC_W'(prod[i]);
    end else begin : g_add
      fir_adder #(.PROD_W(PROD_W), .W(ACC_W)) u_add (
        .prod (prod[i]),
        .acc  (z[i+1]),
        .sum  (sum[i])
      );
    end

    if (i == 0) begin : g_out
      assign z[i] = '0;
    end else begin : g_z
      fir_delay #(.W(ACC_W)) u_z (
        .clk (clk),
        .rst (rst),
        .en  (in_valid),
        .d   (sum[i]),
        .q   (z[i])
      );
    end
  end

  // Output register.
  fir_delay #(.W(ACC_W)) u_y (
    .clk (clk),
    .rst (rst),
    .en  (in_valid),
    .d   (sum[0]),
    .q   (y)
  );

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  initial begin
    assert (NTAPS >= 2) else $error("fir_transposed: NTAPS must be at least 2");
    assert (ACC_W >= DATA_W + COEF_W + $clog2(NTAPS))
      else $error("fir_transposed: ACC_W too small for a full-precision sum");
  end

endmodule
