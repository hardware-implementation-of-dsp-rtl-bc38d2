// tb_fir_sample_source - checks the sample player with a short divider (DIV = 5):
// a strobe every DIV clocks, the first one DIV clocks after reset, the stored table
// played in order and restarted after the last entry, and wrap on the last entry.
module tb_fir_sample_source;
  import fir_pkg::*;
  localparam int DIV = 5;
  logic clk = 0, rst;
  logic [DATA_W-1:0] x;
  logic valid, wrap;
  logic [$clog2(NSAMP)-1:0] idx;
  int checks = 0, failures = 0;

  // Expected table, the test signal of the design.
  localparam logic [7:0] EXP [8] = '{8'h0D, 8'h14, 8'h1B, 8'h22, 8'h27, 8'h2C, 8'h30, 8'h32};

  fir_sample_source #(.DATA_W(DATA_W), .NSAMP(NSAMP), .DIV(DIV), .SAMPLES(SINE_SAMPLES)) dut (
    .clk(clk), .rst(rst), .x(x), .valid(valid), .idx(idx), .wrap(wrap));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycle, last_cycle, n;
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    cycle = 0; last_cycle = 0; n = 0;
    while (n < 3 * NSAMP + 2) begin
      @(posedge clk); #1;
      cycle++;
      if (valid) begin
        checks++;
        if (cycle - last_cycle != DIV) begin
          failures++;
          $display("sample %0d came %0d clocks after the previous one", n, cycle - last_cycle);
        end
        last_cycle = cycle;
        checks++;
        if (x !== EXP[n % 8] || int'(idx) != n % 8) begin
          failures++;
          $display("sample %0d: x=%h idx=%0d expected %h", n, x, idx, EXP[n % 8]);
        end
        checks++;
        if (wrap !== (n % 8 == 7)) begin
          failures++;
          $display("sample %0d: wrap=%b", n, wrap);
        end
        n++;
      end else begin
        checks++;
        if (wrap) begin failures++; $display("wrap without valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
