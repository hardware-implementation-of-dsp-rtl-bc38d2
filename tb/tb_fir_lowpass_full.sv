// tb_fir_lowpass_full - end-to-end test of the low-pass demonstrator at its default
// parameters: a 50 MHz clock (20 ns) and a 1.6 kHz sampling rate, i.e. 31250 clocks
// per sample, so one sample enters the filter every 625 us of simulated time.
// The reference output is the direct convolution, computed here, of the cyclically
// repeated eight test samples with the eight low-pass coefficients, starting from an
// all-zero history. Checked: sample spacing, sample order, table wrap, one clock from
// x_valid to y_valid, every y value, led = y[15:0], and a reset in mid-run that must
// restart the signal and clear the filter history.
// Mechanisms counted (each must occur): sample strobes, table wraps, outputs with a
// fully filled delay chain, and mid-run resets.
module tb_fir_lowpass_full;
  localparam int DIV = 31250;  // expected spacing at the defaults
  localparam int H [8] = '{6, 32, 111, 210, 255, 210, 111, 32};
  localparam int S [8] = '{13, 20, 27, 34, 39, 44, 48, 50};

  logic clk = 0, rst;
  logic [7:0]  x;
  logic        x_valid, y_valid, sample_wrap;
  logic [2:0]  sample_idx;
  logic [18:0] y;
  logic [15:0] led;
  int checks = 0, failures = 0;
  int n_strobe = 0, n_wrap = 0, n_full = 0, n_reset = 0;

  fir_lowpass_top dut (
    .clk(clk), .rst(rst), .x(x), .x_valid(x_valid), .sample_idx(sample_idx),
    .sample_wrap(sample_wrap), .y(y), .y_valid(y_valid), .led(led));

  always #10 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(int n);  // output for sample n (n = 0 first)
    int s = 0;
    for (int i = 0; i < 8; i++)
      if (n - i >= 0) s += H[i] * S[(n - i) % 8];
    return s;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // Run nsamp samples after a reset and check everything on the way.
  task automatic run(int nsamp);
    int cycle = 0, last = 0, n = 0;
    bit pending = 0;
    while (n < nsamp || pending) begin
      @(posedge clk); #1;
      cycle++;
      if (pending) begin
        check(y_valid, "y_valid not one clock after x_valid");
        check(int'(y) == ref_y(n - 1),
              $sformatf("sample %0d: y=%0d expected %0d", n - 1, y, ref_y(n - 1)));
        check(led == y[15:0], "led is not y[15:0]");
        if (n - 1 >= 7) n_full++;
        pending = 0;
      end else begin
        check(!y_valid, "y_valid without a sample");
      end
      if (x_valid) begin
        n_strobe++;
        check(cycle - last == DIV, $sformatf("sample spacing %0d", cycle - last));
        last = cycle;
        check(int'(x) == S[n % 8] && int'(sample_idx) == n % 8,
              $sformatf("sample %0d: x=%0d idx=%0d", n, x, sample_idx));
        check(sample_wrap == (n % 8 == 7), "wrap flag");
        if (sample_wrap) n_wrap++;
        n++;
        pending = 1;
      end
    end
  endtask

  initial begin
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(2 * 8 + 3);
    // reset in the middle of a table pass
    rst = 1;
    @(posedge clk); #1;
    check(y == '0 && !x_valid && !y_valid, "reset did not clear the outputs");
    n_reset++;
    rst = 0;
    run(8);

    check(n_strobe > 0, "no sample strobe");
    check(n_wrap > 0, "no table wrap");
    check(n_full > 0, "delay chain never filled");
    check(n_reset > 0, "no mid-run reset");
    $display("mechanisms: strobes=%0d wraps=%0d full-chain outputs=%0d resets=%0d",
             n_strobe, n_wrap, n_full, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
