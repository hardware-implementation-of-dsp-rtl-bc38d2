// fir_sample_source - plays a stored table of input samples into the filter.
//
// A clock divider produces one sample strobe every DIV clocks (the sampling period,
// 50 MHz / 1.6 kHz = 31250 clocks by default). On each strobe the next entry of the
// NSAMP-entry sample table is presented on x together with a one-clock valid pulse;
// after the last entry the table starts over, so the test signal repeats without end.
//
// Interface: clk, rst (synchronous, active high); outputs x (DATA_W bits), valid
// (one clock per sample), idx (table index of the sample on x) and wrap (high with
// the valid of the last table entry).
// Timing: after reset the first strobe comes DIV clocks later and carries entry 0;
// x holds each sample until the next strobe.
// Storing the sine samples in the design and feeding them to the filter follows the
// document; cyclic playback and the divider are this design's choices.
module fir_sample_source #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned NSAMP  = 8,
  parameter int unsigned DIV    = fir_pkg::SAMPLE_DIV,
  parameter logic [DATA_W-1:0] SAMPLES [NSAMP] = fir_pkg::SINE_SAMPLES
) (
  input  logic                     clk,
  input  logic                     rst,
  output logic [DATA_W-1:0]        x,
  output logic                     valid,
  output logic [$clog2(NSAMP)-1:0] idx,
  output logic                     wrap
);

  localparam int unsigned CNT_W = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned IDX_W = $clog2(NSAMP);

  logic [CNT_W-1:0] cnt;
  logic             tick;
  logic [IDX_W-1:0] next_idx;

  assign tick = (cnt == CNT_W'(DIV - 1));

  always_ff @(posedge clk) begin
    if (rst)       cnt <= '0;
    else if (tick) cnt <= '0;
    else           cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      next_idx <= '0;
      idx      <= '0;
      x        <= '0;
      valid    <= 1'b0;
      wrap     <= 1'b0;
    end else begin
      valid <= tick;
      if (tick) begin
        x        <= SAMPLES[next_idx];
        idx      <= next_idx;
        wrap     <= (next_idx == IDX_W'(NSAMP - 1));
        next_idx <= (next_idx == IDX_W'(NSAMP - 1)) ? '0 : next_idx + 1'b1;
      end else begin
        wrap <= 1'b0;
      end
    end
  end

  initial begin
    assert (NSAMP >= 2) else $error("fir_sample_source: NSAMP must be at least 2");
    assert (DIV >= 1) else $error("fir_sample_source: DIV must be at least 1");
  end

endmodule
