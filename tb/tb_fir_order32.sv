// tb_fir_order32 - the transposed filter core at order 32 (33 taps), the size of the
// low-pass specification: cut-off 50 Hz at 1.6 kHz sampling.
// The coefficients are not part of the design; they are computed here as a
// Hamming-windowed sinc, h(i) = round(K * w(i) * sin(2*pi*fc*(i-16)) / (pi*(i-16))),
// fc = 50/1600, w(i) = 0.54 - 0.46*cos(2*pi*i/32), scaled so the largest tap is 255.
// Two unsigned 8-bit test sines (128 + 100*sin) are filtered: 50 Hz in the pass band
// and 400 Hz in the stop band. Every output is compared with a direct convolution
// computed here, and the steady-state swing of the 400 Hz output must be far below
// that of the 50 Hz output (the filter must actually be low-pass).
module tb_fir_order32;
  localparam int N = 33;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst, in_valid, out_valid;
  logic [7:0]  x;
  logic [7:0]  coef [N];
  logic [21:0] y;
  int checks = 0, failures = 0;
  int hc [N];
  int xs [$];

  fir_transposed #(.DATA_W(8), .COEF_W(8), .NTAPS(N), .ACC_W(22)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x), .coef(coef),
    .out_valid(out_valid), .y(y));

  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Filter one tone for nsamp samples; return the output swing over the last 64.
  task automatic tone(real f, int nsamp, output int swing);
    int ymin = 32'h7fffffff, ymax = 0;
    rst = 1; in_valid = 0;
    @(posedge clk); #1;
    rst = 0;
    xs.delete();
    for (int n = 0; n < nsamp; n++) begin
      int e = 0;
      x = 8'($rtoi(128.0 + 100.0 * $sin(2.0 * PI * f * n / 1600.0) + 0.5));
      xs.push_front(int'(x));
      for (int i = 0; i < N && i < xs.size(); i++) e += hc[i] * xs[i];
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid || int'(y) != e) begin
        failures++;
        if (failures < 10) $display("f=%0.0f n=%0d: y=%0d expected %0d", f, n, y, e);
      end
      if (n >= nsamp - 64) begin
        if (int'(y) < ymin) ymin = int'(y);
        if (int'(y) > ymax) ymax = int'(y);
      end
      @(posedge clk); #1;
    end
    swing = ymax - ymin;
  endtask

  initial begin
    automatic real w [N];
    automatic real peak = 0.0;
    int s50, s400;
    for (int i = 0; i < N; i++) begin
      automatic real t = i - 16;
      w[i] = (t == 0) ? 2.0 * 50.0 / 1600.0 : $sin(2.0 * PI * 50.0 / 1600.0 * t) / (PI * t);
      w[i] = w[i] * (0.54 - 0.46 * $cos(2.0 * PI * i / 32.0));
      if (w[i] > peak) peak = w[i];
    end
    for (int i = 0; i < N; i++) begin
      hc[i] = $rtoi(255.0 * w[i] / peak + 0.5);
      coef[i] = 8'(hc[i]);
    end
    x = '0;
    tone(50.0, 160, s50);
    tone(400.0, 160, s400);
    $display("coefficients: %p", hc);
    $display("output swing: 50 Hz %0d, 400 Hz %0d", s50, s400);
    checks++;
    if (s400 * 20 > s50) begin
      failures++;
      $display("stop-band tone not attenuated by 26 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
