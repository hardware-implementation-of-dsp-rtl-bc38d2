// tb_fir_transposed - checks the 8-tap transposed-form filter against a direct
// convolution computed here.
//  1. Impulse: x = 1 then zeros, with the low-pass coefficients; y must replay h(0..7)
//     and then return to 0.
//  2. Random samples at random spacing with random coefficients that change between
//     samples. A transposed filter multiplies each sample by the coefficients valid
//     when it arrived, so the reference is y(n) = sum_i h_{n-i}(i) * x(n-i).
//  3. The largest input with the largest coefficients, to show the sum never wraps.
// Every output must arrive exactly one clock after its input strobe.
module tb_fir_transposed;
  import fir_pkg::*;
  localparam int N = NTAPS;
  logic clk = 0, rst, in_valid, out_valid;
  logic [DATA_W-1:0] x;
  logic [COEF_W-1:0] coef [N];
  logic [ACC_W-1:0]  y;
  int checks = 0, failures = 0;

  // Products of the last N samples, each with the coefficients of its own time.
  longint hist [N][N];

  fir_transposed #(.DATA_W(DATA_W), .COEF_W(COEF_W), .NTAPS(N), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x), .coef(coef),
    .out_valid(out_valid), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expected();
    longint s = 0;
    for (int i = 0; i < N; i++) s += hist[i][i];
    return s;
  endfunction

  // Apply one sample, then idle for gap clocks, checking the output timing.
  task automatic push(logic [DATA_W-1:0] xv, int gap);
    longint e;
    for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
    for (int i = 0; i < N; i++) hist[0][i] = longint'(xv) * longint'(coef[i]);
    e = expected();
    x = xv;
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    x = DATA_W'($urandom);  // ignored without a strobe
    checks++;
    if (!out_valid || longint'(y) != e) begin
      failures++;
      if (failures < 10) $display("y=%0d valid=%b expected %0d", y, out_valid, e);
    end
    for (int g = 0; g < gap; g++) begin
      @(posedge clk); #1;
      checks++;
      if (out_valid || longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("output changed or strobed without input");
      end
    end
  endtask

  task automatic do_reset();
    rst = 1; in_valid = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int k = 0; k < N; k++) for (int i = 0; i < N; i++) hist[k][i] = 0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) coef[i] = LPF_COEF[i];
    x = '0;
    do_reset();
    checks++;
    if (y !== '0 || out_valid) begin failures++; $display("reset did not clear the output"); end

    // 1. impulse response
    push(1, 2);
    for (int i = 1; i < N + 2; i++) push(0, 0);
    // direct check of the impulse response values against the table
    do_reset();
    for (int n = 0; n < N + 2; n++) begin
      x = (n == 0) ? DATA_W'(1) : '0;
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (int'(y) != ((n < N) ? int'(LPF_COEF[n]) : 0)) begin
        failures++;
        $display("impulse response h(%0d)=%0d", n, y);
      end
    end

    // 2. random samples, spacing and coefficients
    do_reset();
    for (int t = 0; t < 3000; t++) begin
      if ($urandom % 5 == 0)
        for (int i = 0; i < N; i++) coef[i] = COEF_W'($urandom);
      push(DATA_W'($urandom), $urandom % 3);
    end

    // 3. full scale
    for (int i = 0; i < N; i++) coef[i] = '1;
    for (int t = 0; t < 2 * N; t++) push('1, 0);
    checks++;
    if (int'(y) != N * 255 * 255) begin failures++; $display("full-scale sum %0d", y); end

    // reset in the middle clears the history
    do_reset();
    checks++;
    if (y !== '0) begin failures++; $display("reset did not clear y"); end
    push(8'd3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
