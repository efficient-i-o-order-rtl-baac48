# 256-point radix-2 FFT with natural-order input and output and Vedic multipliers

This is a streaming 256-point fast Fourier transform that takes two samples per
clock. It reads them in plain time order, x(2n) and x(2n+1). It writes the
spectrum in plain frequency order, X(2k) and X(2k+1). No frame buffer sits in
front of it or behind it. The output order is fixed by short delay lines and
2x2 switches in the data stream. The twiddle rotations use Vedic
(Urdhva-Tiryagbhyam, "vertically and crosswise") multipliers instead of the
`*` operator.

The design is based on the article "Efficient I/O order Radix-2 FFT
Architecture using Vedic Multiplier" (A. Raghuvanshi). The article gives these
parts:

- the 4x4 Vedic multiplier built from 2x2 blocks;
- the delay-commutator unit at the input (delay, switch SW, delay of N/4);
- a bit-reversal cascade with the delays c_k = N/(8*2^(k-1)) - 2^(k-1);
- the butterfly and the X(2k), X(2k+1) output order;
- N = 256 and 16-bit input data.

It does not say how these parts are chained, controlled or sized. Those
choices, listed in [Departures](#departures-and-open-points), are this design's
own.

## Interface and timing

`fft_top` (parameter `LOGN`, default 8, N = 2^LOGN):

| port | dir | type | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all logic on the rising edge |
| `rst_n` | in | 1 | synchronous active-low reset of the control state |
| `in_sof` | in | 1 | high with the first pair of a frame |
| `in0`, `in1` | in | `cplx_t` | x(2n), x(2n+1) |
| `out_sof` | out | 1 | high with the first output pair, X(0), X(1) |
| `out0`, `out1` | out | `cplx_t` | X(2k)/N, X(2k+1)/N |

`cplx_t` (in `fft_pkg`) is a packed struct holding 16-bit signed `re` and `im`.

- **Stream:** a frame is N/2 = 128 clocks, one pair per clock. Frames follow
  each other with no gap: pulse `in_sof` every 128 clocks. Nothing stalls and
  there is no valid signal. The input must keep running to push a frame out.
  After the last frame, drive zeros.
- **Latency:** from `in_sof` to `out_sof` it is 319 clocks at N = 256. The
  general formula is given in `fft_top.sv`, and the testbenches check it.
  Throughput is one 256-point frame every 128 clocks.
- **Reset:** only counters and start-of-frame flags are reset. The data
  registers are not, so outputs are meaningless until the first `out_sof`.
- **Scaling:** every butterfly halves its results, so the output is X(k)/N.
  Against a double-precision DFT the error is at most 2 LSB at N = 32 and at
  N = 256.

## How the order is kept: bits of the time index

The whole design is easiest to follow as bookkeeping of index bits. A frame
of N = 2^n samples takes N/2 clocks. The clock index within a frame has n-1
bits, t_(n-2)..t_0. The lane, 0 or 1, adds one more bit, p. At the input,
sample x(i) sits at p = i_0 and t_j = i_(j+1).

Two circuits move bits between these positions without storing a whole frame:

- **Delay commutator** (`delay_commutator`): it exchanges p with t_K. The
  lower lane is delayed by 2^K. A switch (`sw`) crosses the lanes while t_K of
  the entering pair is 1. The upper output is then delayed by 2^K.
- **Bit exchange** (`bit_exchange`, one per lane): it exchanges t_I with t_J.
  Samples with (t_J, t_I) = (0, 1) trade places with the samples 2^J - 2^I
  later. The cell is a delay of that length between two multiplexers. A
  (1, 0) sample bypasses the delay, and at that moment the sample leaving the
  delay is fed back into it for a second pass. Every other sample goes through
  the delay once.

The chain in `fft_top` is:

1. **`input_reorder`.** `bit_reversal` reverses t_0..t_(n-3) on each lane. It
   uses exchange cells with delays 31, 14 and 4 at N = 256, which are the
   delays c_1..c_3 of the article's cascade. A commutator with K = n-2 (delay
   N/4 = 64) then makes the data fully bit-reversed: pair m holds
   x(rev(2m)) and x(rev(2m+1)). Latency 113.
2. **`fft_stage` S = 1..n**, decimation in time. Stage S pairs samples
   2^(S-1) apart in the bit-reversed sequence. Its commutator (K = S-2) brings
   such partners into one pair. `cmul` multiplies the lower one by
   W_(2^S)^m, where m is the clock index mod 2^(S-1). `butterfly` then forms
   (a + Wb)/2 and (a - Wb)/2. Stage 1 has only the butterfly, because all its
   twiddles are 1. Latency is 1 for S = 1 and 2^(S-2)+2 for the others.
3. **`output_reorder`.** After stage n, the upper lane holds X(t) and the lower
   lane X(t + N/2). A commutator with K = 0, then exchange cells on time bits
   (0,1), (1,2), ..., (n-3, n-2), rotate the index into X(2k), X(2k+1).
   Latency N/4.

Each unit keeps its own frame counter. The counter restarts on the `sof` flag
that travels with the data, so units can be added or removed without
recomputing global timing. A delay of 0 is allowed everywhere.

## Vedic multiplier

- `vedic_mul2x2` is the 2x2 cell: four AND gates and two half adders.
- `vedic_mul` (W = 16) cuts both operands into 2-bit digits and multiplies
  every digit pair with a 2x2 cell. It then merges level by level. Four
  BxB products give one 2Bx2B product: {hi*hi, lo*lo} plus
  (hi*lo + lo*hi) << B/2. The first merge level is the 4x4 multiplier of the
  article. The product is combinational.
- `vedic_mul_signed` wraps it in sign-magnitude conversion.
- `cmul` uses four of these multipliers: re = ac - bd and im = ad + bc. It
  rounds to nearest, removes the 14 twiddle fraction bits, saturates to 16
  bits and registers the result.

Twiddles are Q2.14, so +1.0 is exactly 16384. `twiddle_rom` computes them at
elaboration with `$cos`/`$sin`, as W_M^m = cos(2πm/M) - j·sin(2πm/M) rounded
to nearest. Stage S has a table of its own with 2^(S-1) entries.

## Files

| file | content |
|---|---|
| `rtl/fft_pkg.sv` | widths, `cplx_t`, `twid_t` |
| `rtl/vedic_mul2x2.sv`, `rtl/vedic_mul.sv`, `rtl/vedic_mul_signed.sv` | multipliers |
| `rtl/twiddle_rom.sv`, `rtl/cmul.sv`, `rtl/butterfly.sv` | arithmetic |
| `rtl/sw.sv`, `rtl/delay_line.sv`, `rtl/bit_exchange.sv`, `rtl/delay_commutator.sv` | reordering primitives |
| `rtl/bit_reversal.sv`, `rtl/input_reorder.sv`, `rtl/output_reorder.sv`, `rtl/fft_stage.sv` | pipeline sections |
| `rtl/fft_top.sv` | the FFT |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_fft_full.sv` | whole FFT at N = 256, 4 frames |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

- `tb_fft_top` (N = 32, 6 frames) and `tb_fft_full` (N = 256) compare every
  output with a double-precision DFT. They check the latency and the frame
  spacing. They also count exchange bypasses, commutator crossings and
  non-trivial twiddles, and fail if any of the three never happened.
- The reordering testbenches tag each sample with its frame and index and
  check the exact permutation.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
      rtl/fft_pkg.sv tb/tb_fft_full.sv --top-module tb_fft_full
    ./obj_dir/Vtb_fft_full

Replace `tb_fft_full` with any other testbench name. The 256-point run takes
under a minute. Set a smaller size with `fft_top #(.LOGN(n))`, n >= 3.

## Departures and open points

- **Single stream, two lanes.** The article's architecture comes from a
  twin-stream design. Its four-lane switch network (two SW cells with lanes 2
  and 3 crossed, "SW_1/SW_2") only joins the two streams. This single-stream
  FFT does not contain it.
- **Final stage.** The article draws the last stages folded: two banks of four
  registers recirculate through a pair of butterflies. It gives no control
  for this. Here every stage has its own butterfly, and the X(2k), X(2k+1)
  order comes from the separate `output_reorder`. This costs N/4 clocks of
  latency and about N/4 registers per lane.
- **Placement of the bit reversal.** The article merges one exchange cell and
  part of the N/4 delay into the lower lane of the input commutator. Here both
  lanes get a complete `bit_reversal` and the commutator delay is a plain
  chain. The permutation is the same. The article's leading alignment delay
  "c_0" has no value given and is not a separate chain.
- **Odd log2N:** the middle time bit stays in place, so 2*floor((n-2)/2)
  multiplexers are used per lane.
- **Chosen here, not given by the article:** the decimation-in-time order of
  the stages, the switch and multiplexer select rules, the per-stage 1/2
  scaling, rounding and saturation, the Q2.14 twiddle format, the register
  stages, the reset scope and the continuous-stream interface.
- **Not reproduced:** the article's FPGA figures (709 registers, 448 LUTs,
  20.703 ns on a Virtex-5) belong to its own implementation. Nothing here has
  been placed or routed. The delay lines are written as plain shift registers
  and make up most of the storage: 608 delayed samples (19,456 bits) at
  N = 256, i.e. 2 x (49 + 64 + 127 + 64) over the input bit reversal, the
  input commutator, the stage commutators and the output reorder. On an
  FPGA they map to shift-register LUTs or block RAM.
