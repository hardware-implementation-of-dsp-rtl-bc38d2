// fir_pkg - shared widths, types and constant tables of the low-pass FIR design.
//
// The filter works on 8-bit unsigned input samples and 8-bit unsigned coefficients
// (both are printed as two hexadecimal digits with positive decimal values). Products
// are 16 bits wide and the sum of NTAPS products needs clog2(NTAPS) more bits, so the
// accumulator width ACC_W keeps full precision and never overflows.
//
// LPF_COEF is the printed low-pass coefficient set h(0)..h(7), designed offline with a
// windowed-sinc method for a 50 Hz cut-off at 1.6 kHz sampling. SINE_SAMPLES are the
// eight quantised samples of the 50 Hz test sine. Both tables are taken as printed.
// The 50 MHz system clock is that of the usual Spartan-3 starter board and is this
// design's own assumption; FS_HZ (1.6 kHz) is the specified sampling rate.
package fir_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned NTAPS  = 8;
  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(NTAPS);
  localparam int unsigned OUT_W  = 16;   // width of the board output (led[15:0])

  localparam int unsigned CLK_HZ = 50_000_000;
  localparam int unsigned FS_HZ  = 1_600;
  localparam int unsigned SAMPLE_DIV = CLK_HZ / FS_HZ;  // 31250 clocks per sample

  localparam int unsigned NSAMP = 8;

  typedef logic [DATA_W-1:0] sample_t;
  typedef logic [COEF_W-1:0] coef_t;
  typedef logic [ACC_W-1:0]  acc_t;

  typedef coef_t   coef_set_t [NTAPS];
  typedef sample_t sample_set_t [NSAMP];

  // Low-pass coefficients h(0) .. h(7).
  localparam coef_set_t LPF_COEF = '{
    8'h06, 8'h20, 8'h6F, 8'hD2, 8'hFF, 8'hD2, 8'h6F, 8'h20
  };

  // Eight samples of the 50 Hz input sine, x1 .. x8.
  localparam sample_set_t SINE_SAMPLES = '{
    8'h0D, 8'h14, 8'h1B, 8'h22, 8'h27, 8'h2C, 8'h30, 8'h32
  };

endpackage
