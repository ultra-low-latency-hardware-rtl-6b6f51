# Fully parallel 256-point radix-4 FFT for optical wireless receivers

Optical wireless links that use LEDs send intensity, so the transmitted
signal is real and positive. Multicarrier schemes such as DCO-OFDM and
ACO-OFDM therefore carry data on a spectrum that is Hermitian-symmetric:
bin `k` is the complex conjugate of bin `N-k`. The receiver needs an FFT,
and a serial FFT core takes hundreds of clock cycles per frame. This is far
too slow for an ultra-low-latency link.

This RTL computes a whole 256-point FFT in **3 clock cycles**. It accepts a
new 256-sample frame on **every** cycle, which at 122.88 MHz is 24 ns of
latency and 31.5 Gsample/s. Every one of the 4 x 64 radix-4 dragonflies is
built in hardware. The cost of a design like this is the fabric, not time.
Word growth is kept down by three measures:

* **Back scaling.** After each twiddle multiplication the word is shifted
  right by 9 bits. Each multiplication stage then grows the word by 2 bits
  instead of 11.
* **Cheap rounding.** An optional one-adder rounding undoes most of the
  truncation error, with no extra cycle.
* **Hermitian mirror.** This is an alternative to rounding. The more
  accurate upper half of the spectrum is conjugated and copied over the
  lower half. For real inputs this is free.

The architecture follows the paper "Ultra Low Latency Hardware Optimised
Radix-4 FFT for Optical Wireless FPGA Transceivers via Hermitian Symmetry
Characteristics" (Codd et al.). The parts that paper does not pin down are
this implementation's own choices. They are listed in
[Departures and own choices](#departures-and-own-choices).

## Data flow

```
          +-----------------+   +----------------------------------------------+   +-----------------+
 load --> | test_sample_gen | ->|               fft256_parallel                | ->| output_combiner | --> probe buses
 port     | 20 frames x 256 |   | stage1 |reg| stage2 |reg| stage3  stage4 |reg|   | R0..R255 concat |     (logic analyser)
          +-----------------+   | 64 DF      | 64 DF      | 64 DF   64 DF      |   | I0..I255 concat |
                 ^              |  x W, >>9  |  x W, >>9  | x W,>>9  adds only |   +-----------------+
                 | start        +----------------------------------------------+
          +-----------------+
 arm ---> | test_controller | --> sub-module reset
          +-----------------+
```

`rfsoc_fft_system` is the top level. It is the on-board test set-up: a
generator replays 20 stored frames, the FFT transforms them, and a combiner
packs each spectrum onto two wide buses for a logic analyser. The analyser
core itself is vendor IP and is not included. Its probe signals are ports of
the top. The FFT core on its own is `fft256_parallel`.

## The radix-4 DIF structure

A 256-point transform has log4(256) = 4 stages. Each stage has 256/4 = 64
dragonflies (`r4_dragonfly`). A dragonfly is a 4-point DFT. Multiplying by
±j only swaps the real and imaginary parts and changes a sign, so the
dragonfly uses adders only:

```
y0 = x0 +  x1 + x2 +  x3        y2 = x0 -  x1 + x2 -  x3
y1 = x0 - jx1 - x2 + jx3        y3 = x0 + jx1 - x2 - jx3
```

Decimation in frequency is used, with the twiddles on the dragonfly
outputs:

* In stage `s`, the 256 samples form 4^(s-1) independent sub-transforms of
  length `L = 256 / 4^(s-1)`.
* Dragonfly `n` of a sub-transform reads positions `n`, `n+L/4`, `n+L/2` and
  `n+3L/4`, and writes its outputs back to the same positions.
* Output `k` of that dragonfly is multiplied by `W_L^(k*n)`.
* The last stage (`L = 4`) has no twiddles.

After the last stage, bin `k` sits at position `digit_rev4(k)`, the base-4
digit reversal of `k`. The core undoes this order by wiring, so `out_re[k]`
and `out_im[k]` are bin `k`.

`fft_stage` builds one stage from 64 `dragonfly_unit`s. A `dragonfly_unit` is
one dragonfly plus its twiddle multipliers and back scalers. Twiddle
exponents are elaboration-time parameters, so each multiplier multiplies by a
constant and no twiddle memory is needed.

### Pipeline and latency

| edge | what is registered |
|------|--------------------|
| 1    | stage 1 result (12 bits in the scale-back models) |
| 2    | stage 2 result (14 bits) |
| 3    | stage 3 **and** stage 4 (the adder-only stage shares the cycle), reordered, mirrored if SB-MNC (17 bits) |

There is no input register. A frame that is on `in_re`/`in_im` with
`in_valid` high before edge 1 is on `out_re`/`out_im` with `out_valid` high
after edge 3. A new frame may be presented on every cycle. Only the valid
pipeline is reset. The data registers are not reset, and must be ignored
while `out_valid` is low. For other power-of-4 sizes the latency is
`log4(N) - 1`, or `log4(N)` with `MERGE_LAST = 0`.

## Word widths and back scaling

This is the subtle part of the design. The inputs are signed 10-bit samples.
The twiddles are signed 10-bit numbers scaled by 2^9, so that 1.0 is 512.
They are rounded to nearest, and +512 saturates to 511. The output width
comes from the largest bin of a *real* input. Its spectrum is symmetric, so
the peak energy splits between two mirrored bins. That gives
`log2(N) + IN_W - 1 = 17` bits.

A multiplication stage takes an `I`-bit word and produces the following:

| quantity | width |
|---|---|
| dragonfly sum | `I+1` bits for real-valued signals (computed exactly, with `I+2` bits) |
| times a 10-bit twiddle | `I+1+10` bits |
| back scaled by `>>> 9` | `I+2` bits kept |

The shift by `S = TW_W - 1 = 9` divides by the largest twiddle magnitude. The
result is on the same scale as a floating-point FFT.

Register widths after each stage:

| model | stage 1 | stage 2 | stage 3 | stage 4 / output |
|-------|---------|---------|---------|------------------|
| FS (full scale) | 21 | 32 | 43 | 44-bit sum, `>>> 27`, 17 |
| SB-NC, SB-WC, SB-MNC | 12 | 14 | 16 | 17 |

Values that exceed a width **wrap**. There is no saturation. The widths are
sized for real-valued multicarrier signals:

* A real frame with peak amplitude below about 255 LSB can never overflow.
* Real OFDM-like frames and uniformly random real frames with amplitude up
  to 360–500 LSB ran through all testbenches without reaching the limits.
* A full-scale DC input of 511 on every sample gives 130,816 in bin 0. This
  does not fit in 17 bits.
* Complex inputs need one more bit of growth, because their spectrum is not
  symmetric. The core accepts them, and the tests check that the result is
  bit-exact, but it does not guard them against overflow.

### Truncation and its compensation

An arithmetic right shift floors the value. In a DIF FFT the floor errors
pile up in the lower half of the spectrum, bins 1–127. `back_scaler` with
`ROUND = 1` adds the most significant discarded bit to the shifted value.
This is round-half-up at the cost of one adder and no cycle. The only wrong
case is an exact remainder of -1/2, which rounds up instead of away from
zero.

### The four models (`MODEL` parameter, `fft_pkg::fft_model_e`)

| `MODEL` | shift | rounding | mirror | use |
|---|---|---|---|---|
| `FFT_FS` | none until the end, then 27 | no | no | accuracy reference; very large |
| `FFT_SB_NC` | 9 per stage | no | no | smallest |
| `FFT_SB_WC` | 9 per stage | yes | no | any input, best scaled accuracy |
| `FFT_SB_MNC` (default) | 9 per stage | no | yes | real-valued inputs only |

The mirror (`hermitian_mirror`) handles the bins as follows:

* Bins 1–127 are replaced by `conj(X[256-k])`.
* Bins 0 and 128 have no partner and pass unchanged.
* The output is then exactly Hermitian.

The mirror is only correct when the input is real.

Accuracy measured in simulation against a double-precision DFT
(`tb_fft256_parallel`). The test set is 20 real multicarrier frames
(peak 500) and 8 uniformly random real frames (±360). NMSE is the error
energy divided by the signal energy. The half columns are per-frame means.

| model | NMSE, all bins | bins 1–127 | bins 129–255 |
|---|---|---|---|
| FS     | 9.2e-7 | 9.2e-7 | 9.3e-7 |
| SB-NC  | 5.7e-6 | 9.9e-6 | 2.6e-6 |
| SB-WC  | 2.0e-6 | 2.2e-6 | 2.2e-6 |
| SB-MNC | 2.4e-6 | 2.6e-6 | 2.6e-6 |

The pattern is the one the design relies on:

* Truncation errors sit in the lower half.
* Rounding removes them.
* Mirroring the upper half comes close to rounding without its adders.

The exact values depend on the random frames the testbench generates.

## Test system blocks

* **`test_controller`**
  * After `rst_n` rises, it keeps `sub_rst_n` low for `RESET_CYCLES` (16)
    cycles, then waits for `arm`.
  * On `arm` it gives a one-cycle `start`, then stays in RUN.
  * Dropping `arm` resets the sub-modules again.
  * All outputs are registered.
* **`test_sample_gen`**
  * A register array holds 20 frames x 256 complex 10-bit samples (102,400
    bits).
  * A whole frame is written per cycle through `wr_en`/`wr_frame`/`wr_re`/
    `wr_im`.
  * After `start` it outputs frames 0, 1, …, 19, 0, … one per cycle, with
    registered outputs, `out_frame` and a `wrap` flag on frame 19.
* **`output_combiner`**
  * On each valid frame it registers the 256 real outputs as one 4352-bit
    bus, and the imaginary outputs as another. Sample `k` is at bits
    `[17k +: 17]`.
  * It holds the buses between frames, pulses `out_valid` and counts frames.
* **`rfsoc_fft_system`** wires these parts around the FFT.
  * Latency from a frame on the FFT inputs (`probe_in_*`) to the probe buses
    is 4 cycles.
  * The generator's read adds 1 cycle in front of that.

## Departures and own choices

Choices made where the source gives no detail:

* The inputs are signed two's complement.
* Words wrap on overflow.
* Output 0 of a dragonfly, and every twiddle of exponent 0, is an exact
  factor of 1.0. That is 512, a shift, and not the saturated 511. This
  keeps all four outputs of a dragonfly on the same scale.
* The twiddle table rounds to nearest and saturates +512 to 511. This only
  affects `W^192 = +j`.
* Products are formed at full precision before the shift. The published
  figures give I+W+1 bits there (21, 23, 25 for the scaled model; one figure
  prints 24 for the third stage, which disagrees with its own width
  formula). Only the stored widths after the shift (12, 14, 16, 17) affect
  the results, and those match.
* The output is reordered to natural bin order.
* The FS model does not round its final 27-bit shift.
* The bins of the mirror are split as described above. Bins 0 and 128 are
  kept.
* The generator has a load port. The original test frames came from an
  external floating-point reference set.
* The controller's state machine, its 16-cycle reset hold and the `arm`
  input.
* The combiner's bit order, hold behaviour and frame counter.
* `MODEL` defaults to SB-MNC.

Not built:

* the logic analyser, which is vendor IP;
* the board-level clocking and data converters;
* a variant widened for complex inputs. That variant would need one more bit
  of growth.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `fft256_parallel`, `rfsoc_fft_system` | `N` | 256 | FFT size, a power of 4, at least 16 |
| | `IN_W` | 10 | input width; output is `log2(N)+IN_W-1` |
| | `TW_W` | 10 | twiddle width; shift is `TW_W-1` |
| | `MODEL` | `FFT_SB_MNC` | fixed-point model |
| | `MERGE_LAST` | 1 | 1: last two stages share a cycle (latency `log4(N)-1`); 0: one register per stage (latency `log4(N)`), easier timing |
| `rfsoc_fft_system` | `FRAMES` | 20 | stored test frames |
| | `RESET_CYCLES` | 16 | sub-module reset hold |
| | `CW` | 16 | frame counter width |

The width rules live in `rtl/fft_pkg.sv`. These are `stage_width`,
`stage_shift`, `last_shift` and `digit_rev4`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line.

* `tb_fft256_parallel` runs all four models side by side at full size.
  * Frames are streamed back to back, and then with gaps.
  * Each output bin is checked bit-exactly against an integer model in
    `tb/fft_ref_pkg.sv`. That model is written independently, as plain loops
    over the DFT definition.
  * Latency must be exactly 3 cycles.
  * NMSE is checked against a double-precision DFT.
  * SB-MNC output must be Hermitian.
  * The accuracy order above must hold.
* `tb_rfsoc_fft_system` runs the whole system at default parameters. It
  exercises these mechanisms: power-up reset hold, loading 20 frames,
  streaming three passes with generator wrap, reloading a frame while
  running, disarm, and re-arm. Each output frame is checked bit-exactly,
  for NMSE, for symmetry and for a 4-cycle latency.
* `tb_fft_sizes` runs the core at other sizes and pipeline options, with the
  same checks (helper `tb/fft_size_check.sv`):
  * 16 points (latency 1);
  * 64 points (latency 2);
  * 1024 points (latency 4);
  * 256 points with `MERGE_LAST = 0` (latency 4).
* The unit testbenches cover the following:
  * `tb_twiddle_rom`: every twiddle. The table's mean absolute error must be
    below 1.4e-3; it is 5.4e-4.
  * `tb_r4_dragonfly`: random and extreme inputs.
  * `tb_back_scaler`: floor and round-half-up at boundaries.
  * `tb_dragonfly_unit` and `tb_fft_stage`: stages 1, 2 and 4 against the
    model.
  * `tb_hermitian_mirror`, `tb_test_sample_gen`, `tb_output_combiner` and
    `tb_test_controller`.

Not verified: timing closure and the clock rate. Only cycle behaviour is
simulated.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft256_parallel.sv \
    --top-module tb_fft256_parallel -j 8
./obj_dir/Vtb_fft256_parallel
```

Replace the testbench name to run any other. The two full-size testbenches
take about a minute to compile and under a second to run.
