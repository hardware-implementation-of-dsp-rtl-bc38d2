# Transposed-form low-pass FIR filter for a small FPGA

This design is a fixed-point FIR low-pass filter, built to run on a Spartan-3 class
FPGA. It is meant to pass a 50 Hz signal sampled at 1.6 kHz. Every coefficient
multiplies the current input sample in parallel, one multiplier per tap. The products
are summed along a chain of delay registers in *transposed form*, so the longest
combinational path is one multiplier plus one adder, whatever the filter length.

A small demonstrator is wrapped around the filter. It stores eight samples of a 50 Hz
test sine and plays them into the filter at the 1.6 kHz sampling rate. It brings out
the filter output in full and as a 16-bit word meant for the board's LEDs.

Everything is unsigned, full-precision integer arithmetic. No rounding and no overflow
can occur anywhere inside the filter.

## The transposed filter

The filter computes

    y(n) = h(0)·x(n) + h(1)·x(n-1) + ... + h(N-1)·x(n-N+1)      (N = NTAPS = 8)

The direct form would keep the last N *inputs* in a shift register and add N products.
The transposed form keeps N-1 *partial sums* instead:

                x(n) ──┬──────────────┬────── ··· ──────┬──────────────┐
                       │              │                 │              │
                   h(N-1)⊗        h(N-2)⊗            h(1)⊗          h(0)⊗
                       │              │                 │              │
                       └─►[z⁻¹]──►(+)─┴─►[z⁻¹]─► ··· ──►(+)─►[z⁻¹]──►(+)──►[reg]──► y
                          z(N-1)          z(N-2)              z(1)

At every sample strobe the registers load:

    z(N-1) <= h(N-1)·x
    z(i)   <= h(i)·x + z(i+1)          i = N-2 .. 1
    y      <= h(0)·x + z(1)

By induction, z(i) holds h(i)·x(n-1) + h(i+1)·x(n-2) + ... up to h(N-1)·x(n-N+i). This
is the part of the *next* outputs that the past samples have already contributed. The
output is therefore the current product plus z(1).

Three consequences matter when you use it:

* **Latency and rate.** `y` and `out_valid` appear one clock after the `in_valid`
  cycle, and `y` holds until the next sample. The filter accepts one sample per clock
  at most. Samples may be spaced arbitrarily, because the z registers load only on
  `in_valid`.
* **Changing coefficients.** The coefficients are an input port and are read only on
  sample cycles. A sample is multiplied by the coefficients valid when it *arrives*.
  After a change, the output is a mix of old and new responses until N samples have
  passed. The result is y(n) = Σ h_{n-i}(i)·x(n-i), not a clean switch. The unit
  testbench checks exactly this behaviour.
* **Widths.** Products are DATA_W + COEF_W = 16 bits. The chain is
  ACC_W = 16 + clog2(NTAPS) = 19 bits. That is just wide enough for NTAPS products at
  full scale (8·255·255 = 520200 < 2^19). An assertion rejects a smaller ACC_W.

The building blocks are `fir_mult` (combinational product), `fir_adder` (product plus
partial sum) and `fir_delay` (a z⁻¹ register with load enable and synchronous reset).
There are N multipliers, N-1 adders and N-1 z⁻¹ registers, plus the output register.

## Coefficients and test signal

Both tables are in `fir_pkg`. They are 8-bit unsigned values.

| i | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| h(i) `LPF_COEF` | 06 | 20 | 6F | D2 | FF | D2 | 6F | 20 |
| test sample `SINE_SAMPLES` | 0D | 14 | 1B | 22 | 27 | 2C | 30 | 32 |

The coefficients sum to 967. The DC gain is therefore 967, and the output for the test
signal never exceeds 0x32·967 = 48350. That fits in the 16-bit `led` word. Starting
from reset and playing the samples cyclically, the first outputs are 78, 536, 2245,
6018, 11834, 18786, 25693, 31886, 36968, 40214, 39642, 34980, ... with period 8
afterwards. This is simply the convolution, and it is what the testbenches compare
against.

The coefficient set was designed offline. The sources describe a windowed-sinc design
for a 50 Hz cut-off at 1.6 kHz. Only the eight 8-bit values above are given, not how
they were quantised.

## Sample pacing and the demonstrator top

`fir_sample_source` divides the clock by `DIV` to make a one-clock sample strobe. It
presents the next table entry on `x` with that strobe. After the last entry it starts
over. `wrap` marks the last entry, and `idx` gives the table position. The first
strobe comes `DIV` clocks after reset.

`fir_lowpass_top` connects the sample source to `fir_transposed` and ties the
coefficient port to `LPF_COEF`.

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | 50 MHz by default |
| rst | in | 1 | synchronous, active high; clears the filter history and restarts the table |
| x, x_valid | out | 8, 1 | sample entering the filter and its strobe |
| sample_idx, sample_wrap | out | 3, 1 | table position of `x`; last entry |
| y, y_valid | out | 19, 1 | filter output, one clock after `x_valid` |
| led | out | 16 | `y[15:0]` |

The default `DIV = 31250` gives 1.6 kHz from 50 MHz. For another clock, set
`DIV = f_clk / 1600`.

## Where this design departs from its description, or had to choose

* **Filter length.** The description is not consistent about it. It prints eight
  coefficients. It also calls the filter "eighth order", which would mean nine taps,
  and the printed set is symmetric except for a missing ninth 06. It also lists an
  order-32 specification. The default here follows the printed set: 8 taps. The core
  is parameterised, and `tb_fir_order32` runs it with 33 taps.
* **Output register.** In the reference structure, y is taken straight from the last
  adder. Here it is registered, so the output has a defined one-clock latency.
* **Number format.** The format is not specified. Unsigned 8-bit values are used,
  since all listed values are positive.
* **Clock, reset, strobes.** These are own choices. The 50 MHz clock is that of the
  usual Spartan-3 starter board.
* **Cyclic playback** of the eight test samples is an own choice.
* **Not built.** The reference simulation shows a second 16-bit bus whose meaning is
  not stated. High-pass and band-pass variants of the same structure are mentioned,
  but without coefficients. Either can be added by driving `fir_transposed.coef` with
  another set.
* **Output values.** The output values shown in the reference simulation could not be
  reproduced from the two tables. The tests check against the exact convolution
  instead.
* **Size.** The reference FPGA build reports 542 flip-flops. Generic synthesis of this
  top gives 162 flip-flop bits, 34 word-level cells and a 64-bit sample table. The
  difference comes from the board I/O and from the unknown details of that build.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | widths, clock/sample rates, types, coefficient and sample tables |
| `rtl/fir_mult.sv` | tap multiplier |
| `rtl/fir_adder.sv` | stage adder |
| `rtl/fir_delay.sv` | z⁻¹ register with enable |
| `rtl/fir_transposed.sv` | the parameterised transposed-form filter |
| `rtl/fir_sample_source.sv` | test-signal player with sample-rate divider |
| `rtl/fir_lowpass_top.sv` | demonstrator top |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus two system tests |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a watchdog
that counts a failure if the simulation hangs. For example:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/fir_pkg.sv tb/tb_fir_lowpass_top.sv --top-module tb_fir_lowpass_top
    ./obj_dir/Vtb_fir_lowpass_top

| testbench | what it checks |
|---|---|
| `tb_fir_mult` | all 65536 operand pairs |
| `tb_fir_adder` | corner cases and 5000 random sums |
| `tb_fir_delay` | reset, load enable, one-clock delay against a model |
| `tb_fir_transposed` | impulse response equals `LPF_COEF`; 3000 random samples with random gaps and coefficients that change on the fly; full-scale sum; one-clock latency |
| `tb_fir_sample_source` | strobe spacing, table order, wrap, with `DIV = 5` |
| `tb_fir_lowpass_top` | end to end with `DIV = 4`: every output against the convolution, `led`, latency, spacing; a reset in mid-run; counts strobes, wraps, full-chain outputs and resets, each of which must occur |
| `tb_fir_lowpass_full` | the same at the default parameters (31250 clocks per sample, about 0.85 M clocks, under a second) |
| `tb_fir_order32` | 33-tap core with windowed-sinc coefficients computed in the bench: exact outputs for 50 Hz and 400 Hz tones, and the 400 Hz tone at least 26 dB below the 50 Hz one (about 66 dB is observed) |

The sample tables are constants in `fir_pkg`. To try other coefficients, drive
`fir_transposed.coef` directly, or change `LPF_COEF` together with the expected values
in the top-level testbenches.
