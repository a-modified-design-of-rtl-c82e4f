# Variable-length, multi-stream radix-2 SDF FFT

One pipelined FFT engine computes one 2048-point FFT, one or two 1024-point
FFTs, or one, two or four 512-point FFTs - the FFT sizes of the Wi-Max OFDM
profiles (5, 10 and 20 MHz channels) and the several spatial streams of a MIMO
receiver. It does not duplicate hardware per stream. Instead, streams are
**time-interleaved** on a single input, and the pipeline's **decimation-in-time**
stages are arranged so that the first stages of a long FFT compute several
short interleaved FFTs unchanged. The result is then taken from an earlier stage.
Stages that a configuration does not need have their clock stopped.

The RTL follows a published architecture: eleven cascaded radix-2
single-delay-feedback (SDF) stages, a central control unit, per-stage clock
gating and an output select on the last three stages. The fixed-point format,
the valid signalling, the output labelling and the reconfiguration protocol
are this implementation's own. They are marked as such below.

## Why interleaving works

Take a frame of `F = 2^FL` samples at positions `n = 0 .. F-1`. Stage `s`
(1-based) combines positions `n` and `n + F/2^s`. It multiplies the second one
by a twiddle factor first, then forms their sum and difference (radix-2 DIT
with the rotation before the butterfly). The input is in natural order. After
`S` stages, position `n` holds bin `bitrev_S(n)`.

Place `P` streams of length `L` in the frame as *sample m of stream p at
position m*P + p*, so `F = P*L`. Stages 1 .. log2(L) pair positions that are at
least `P` apart. Their distance is a multiple of `P`, so they always belong to
the same stream, and they are exactly the pairs that an `L`-point FFT of that
stream needs. The twiddle depends on the stage and on the butterfly block, not
on `L`: stage `s` uses

    W(s, b) = exp(-j * 2*pi * bitrev_{s-1}(b) / 2^s),     b = n / (2 * F/2^s)

The same per-stage table therefore serves every length and stream count. A
`P x L` configuration runs stages 1 .. log2(L) and takes its output there.
Outputs stay interleaved: position `k'*P + p` holds bin `bitrev(k')` of
stream `p`.

The frame `F = P*L` is 2048 for the three main cases (1x2048, 2x1024, 4x512).
It is only 1024 or 512 for a single 1024-point or 512-point FFT, or for
2x512. For those cases every delay line is tapped at half or quarter depth.

| configuration | frame F | stages used | delay lines (stage 1 .. last used) | result from |
|---------------|---------|-------------|------------------------------------|-------------|
| 1 x 2048      | 2048    | 1 - 11      | 1024, 512, ..., 1                  | stage 11    |
| 2 x 1024      | 2048    | 1 - 10      | 1024, 512, ..., 2                  | stage 10    |
| 4 x 512       | 2048    | 1 - 9       | 1024, 512, ..., 4                  | stage 9     |
| 1 x 1024      | 1024    | 1 - 10      | 512, 256, ..., 1                   | stage 10    |
| 2 x 512       | 1024    | 1 - 9       | 512, 256, ..., 2                   | stage 9     |
| 1 x 512       | 512     | 1 - 9       | 256, 128, ..., 1                   | stage 9     |

## One SDF stage (`sdf_stage`)

Stage `s` has a delay line of depth `D = F/2^s` and works on blocks of `2D`
consecutive samples:

* **First half of a block (phase 0).** The incoming sample goes into the delay
  line. The word that leaves the delay line goes to the stage output. That word
  is the difference half of the previous block.
* **Second half (phase 1).** The incoming sample is rotated by the block's
  twiddle (`complex_mult`, coefficient from `twiddle_rom`). The butterfly
  combines it with its partner, which is just leaving the delay line after `D`
  samples. The sum goes to the output. The difference goes back into the delay
  line and leaves during the next phase 0.

So the stage emits its in-place result in natural order, `D` samples late.
Stage 1 only ever needs `W = 1`, so it has no multiplier. That makes eleven
butterflies and ten multipliers in total.

Parts of a stage:

* `addr_gen` is an up-counter of the samples that enter the stage. It wraps at
  the frame end.
  * Bit `FL - s` of the counter is the phase. At 2048 points that is bit 10 for
    stage 1 down to bit 0 for stage 11, as in the published control table.
  * The bits above the phase bit number the block and address the ROM.
* `twiddle_rom` holds `2^(s-1)` entries, with real and imaginary parts in
  separate tables. The entries are stored in bit-reversed angle order: for
  stage 4 the angles are 0,4,2,6,1,5,3,7 sixteenths of a turn. A plain counter
  therefore addresses it. The contents are computed at elaboration from
  `$cos`/`$sin`. It is a single-port ROM with a clock enable that is read on
  the clock edge. `addr_gen` therefore presents the address of the *next*
  sample's block, and the word for the sample at the stage input is already
  in the ROM's output.
* `sdf_buffer` is a shift register of `DMAX = 2^(NSTAGES-s)` words. It has
  output taps at `DMAX`, `DMAX/2` and `DMAX/4`, selected by
  `tsel = log2(2^NSTAGES / F)`.
* `butterfly` holds the complex adder and subtractor, each halving its result.
* The stage output is registered.
* `out_valid` stays low until the delay line holds its first half block.

A sample only moves when `in_valid` is high. A gap in the input stream
therefore pauses each stage in turn and loses nothing.

## Control and clock gating (`control_unit`, `clock_gate`, `output_select`)

`control_unit` holds the configuration:

* `cfg_len_sel` sets the length `2^NSTAGES >> len_sel` (0, 1, 2 = 2048, 1024,
  512).
* `cfg_str_sel` sets `1 << str_sel` streams (1, 2, 4).

A stream count whose frame would exceed `2^NSTAGES` is reduced, and the code 3
reads as 2. From the configuration the control unit derives:

* the delay-line tap `tsel = len_sel - str_sel`;
* the output select (`len_sel`: 0 = last stage, 1 = one before, 2 = two
  before);
* the clock-gating enables. Stage `s` is *in use* only if `s <= log2(L)`.
  A stage in use is clocked only while it is *busy*: it has a sample at its
  input or a valid result in its output register. A stage that is not in use
  is never clocked. So input gaps also stop the clocks of the stages that
  have nothing to do.

Its 11-bit counter `in_count` counts input samples and wraps at the frame end.

A second counter follows the result stream. It drives `out_stream`, `out_bin`
(the bit-reversal already undone) and `out_frame_last`, so that a consumer can
use the interleaved, bit-reversed output directly.

`clock_gate` is a latch-based gate: a latch that is transparent while `clk` is
low, ANDed with `clk`. It makes the single intended latch of the design.
`fft_top` gives each stage its own gated clock and brings the enables out as
`stage_active`. Reset and reconfiguration open every gate for one cycle so that
the clear reaches all stages.

## Numbers

* Samples are 16-bit signed, real and imaginary.
* Twiddles are 16-bit signed with 14 fraction bits, so +1.0 is exact.
* The rotated sample keeps 18 bits: a rotation can grow a component by up to
  sqrt(2). The multiplier rounds half up.
* Every butterfly output is `(a +/- b + 1) >> 1`, saturated to 16 bits.

So each stage scales by 1/2, and the output is **DFT / L**. A halving stage
never increases the complex magnitude, so inputs whose magnitude stays below
2^15 (for example components within +/-23170) do not saturate anywhere; larger
ones may be clipped. With random
inputs of +/-12000 the error against a double-precision DFT/L stays below 4 LSB
at 2048 points.

## Interface (`fft_top`, parameter `NSTAGES = 11`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (configuration becomes 1 x 2^NSTAGES) |
| `cfg_we`, `cfg_len_sel`, `cfg_str_sel` | in | 1, 2, 2 | load a configuration; **discards all data in flight** |
| `in_valid`, `in_data` | in | 1, 32 | one complex sample (`fft_pkg::cplx_t`, `{re, im}`) per clock at most |
| `out_valid`, `out_data` | out | 1, 32 | result sample |
| `out_stream`, `out_bin`, `out_frame_last` | out | 2, NSTAGES, 1 | stream, frequency bin and end-of-frame of the result sample |
| `stage_active` | out | NSTAGES | clock-gating enable of each stage |

Timing:

* With an uninterrupted input, the first result of a frame is registered
  `sum(D) + S - 1` clock edges after the edge that takes the frame's first
  sample. `S` is the number of stages used, so this is 2057 edges for 1x2048
  and 2052 for 4x512.
* Throughput is one sample per clock for every configuration.
* There is no flush. The tail of a frame leaves while the next frame enters.
  To drain the last frame, feed another frame (for example zeros).
* There is no back-pressure.

## Files

| file | contents |
|------|----------|
| `rtl/fft_pkg.sv` | widths, complex types, `bitrev`, saturation |
| `rtl/fft_top.sv` | top: control unit, 11 gated stages, output select |
| `rtl/sdf_stage.sv` | one SDF stage |
| `rtl/sdf_buffer.sv` | tapped shift-register delay line |
| `rtl/addr_gen.sv` | stage sample counter: phase and ROM address |
| `rtl/twiddle_rom.sv` | stage coefficient ROM |
| `rtl/complex_mult.sv` | rotation by a twiddle |
| `rtl/butterfly.sv` | halving radix-2 butterfly |
| `rtl/control_unit.sv` | configuration, counters, gating enables, output labels |
| `rtl/clock_gate.sv` | latch-based clock gate |
| `rtl/output_select.sv` | result from stage 11, 10 or 9 |
| `tb/fft_ref_pkg.sv` | integer model of the arithmetic and of an in-place DIT FFT |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fft_16pt` |

## Simulating

The stages run on gated clocks derived from `clk`, so the simulator must order
derived-clock domains correctly (Verilator 5 does). Each testbench prints
`TB_RESULT checks=N failures=M` and stops by itself. It
also has a watchdog. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_fft_top \
        rtl/fft_pkg.sv tb/fft_ref_pkg.sv rtl/*.sv tb/tb_fft_top.sv -o sim
    ./obj_dir/sim

`tb_fft_top` runs the default 11-stage design in all six configurations (about
one second of simulation). It checks:

* every output bit-exactly against the integer model, including
  `out_stream`/`out_bin`/`out_frame_last`;
* the first frame of every stream against a floating-point DFT;
* the latency;
* that the gated last stage stays frozen while unused.

It also counts how often an in-use stage had its clock stopped for lack of
data.

It also counts that every mechanism occurred: each length, multi-streaming,
reduced taps, reconfiguration, input stalls and clock gating.

`tb_fft_16pt` does the same with `NSTAGES = 4`. That is the classic
illustration of the scheme: one 16-point FFT, or two interleaved 8-point FFTs
taken from stage 3.

To change the size, set `NSTAGES`. The supported lengths are always
`2^NSTAGES`, half and quarter of it.

## Departures and open points

* **Per-stage counters.** The published control drives each stage's
  multiplexer from a bit of one central counter. Here each stage counts its own
  samples with the same bit assignment. The stage output registers and input
  gaps would otherwise offset the stages from the central count. The central
  counter still exists (`in_count`).
* **Gating granularity.** Gating is per stage, by configuration and by
  activity. Gating a single butterfly or multiplier inside a running stage is
  described in the source as a power measure but is not implemented: here
  they are combinational and hold no clocked state.
* **Reconfiguration.** How the configuration changes while data flows is not
  specified. Here `cfg_we` clears the pipeline.
* **Word length.** The source hints that word length may vary by stage but
  gives no values. All stages use 16 bits with 1/2 scaling.
* **Resource and clock figures.** The published FPGA results cannot be used as
  a reference:
  * Utilization was reported for a small Spartan-3E: 348 flip-flops and 865
    LUTs. That is far below the 2047 x 32 bits of delay line that a 2048-point
    SDF pipeline needs.
  * Two different clock figures were given: 13.67 MHz and 600 MHz.
  * At one sample per clock, a 20 MHz Wi-Max channel (22.4 MS/s) needs a clock
    of at least 22.4 MHz.
* **Delay lines.** These are plain shift registers of flip-flops, as described.
  At 2048 points that is about 65k flip-flops. A RAM-based delay line would be
  the usual choice for an ASIC.
