// fir_lowpass_top - low-pass FIR filter demonstrator for a small FPGA board.
//
// The stored 50 Hz test sine (fir_sample_source) is fed, one sample per 1.6 kHz
// sampling period, into an 8-tap transposed-form FIR filter (fir_transposed) whose
// coefficients are the fixed low-pass set fir_pkg::LPF_COEF. The full-precision
// filter output is brought out on y, and its low 16 bits on led, the board output the
// filter drives.
//
// Interface: clk (50 MHz by default), rst (synchronous, active high).
// Outputs: x / x_valid (sample entering the filter and its one-clock strobe),
//          sample_idx / sample_wrap (table index of x; high with the last entry),
//          y / y_valid (filter output and its strobe, one clock after x_valid),
//          led (y[15:0]).
// For the stored samples y never exceeds 16 bits (largest sample 0x32 times the
// coefficient sum 967 = 48350), so led shows the whole output; larger inputs would
// need the upper bits of y.
// Filter structure, coefficients, samples, sampling rate and 16-bit output follow the
// document; the clock rate, the reset and the strobes are this design's choices.
module fir_lowpass_top
  import fir_pkg::*;
#(
  parameter int unsigned DIV = SAMPLE_DIV
) (
  input  logic             clk,
  input  logic             rst,
  output logic [DATA_W-1:0] x,
  output logic             x_valid,
  output logic [$clog2(NSAMP)-1:0] sample_idx,
  output logic             sample_wrap,
  output logic [ACC_W-1:0] y,
  output logic             y_valid,
  output logic [OUT_W-1:0] led
);

  logic [COEF_W-1:0]        coef [NTAPS];

  for (genvar i = 0; i < NTAPS; i++) begin : g_coef
    assign coef[i] = LPF_COEF[i];
  end

  fir_sample_source #(
    .DATA_W  (DATA_W),
    .NSAMP   (NSAMP),
    .DIV     (DIV),
    .SAMPLES (SINE_SAMPLES)
  ) u_src (
    .clk   (clk),
    .rst   (rst),
    .x     (x),
    .valid (x_valid),
    .idx   (sample_idx),
    .wrap  (sample_wrap)
  );

  fir_transposed #(
    .DATA_W (DATA_W),
    .COEF_W (COEF_W),
    .NTAPS  (NTAPS),
    .ACC_W  (ACC_W)
  ) u_fir (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (x_valid),
    .x         (x),
    .coef      (coef),
    .out_valid (y_valid),
    .y         (y)
  );

  assign led = y[OUT_W-1:0];

endmodule
