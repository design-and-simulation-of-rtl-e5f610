# 64-point radix-4 FFT/IFFT processor

This is a memory-based, pipelined processor for the 64-point discrete Fourier
transform, the transform size used by OFDM modems such as IEEE 802.11a/g. 64 = 4³, so
the transform splits into three radix-4 stages. Each stage has a single radix-4
butterfly, which it uses 16 times per frame, and each stage sits between two 64-word
frame memories. A reorder unit then puts the result into natural frequency order. The
twiddle factors are not read from a ROM. They are constants built into the logic, and
each butterfly input gets its factor in the same clock. The inverse transform uses the
same datapath, with the real and imaginary parts swapped at the input and at the
output.

The RTL follows a published description of a radix-4 64-point FFT processor. That
description gives the block diagram (memories X, X1, X2, X3 and Y, three "R4" stages
with "shift and 16 repeat", a reorder block), the butterfly, twiddle factors without a
ROM, the swap trick for the IFFT and the goal of one clock per sample. It does not give
word lengths, the address mapping, the interfaces or the control. Those are this
design's own choices, and they are marked as such below.

## Data flow

```
 samples ──► fft_loader ──► X ──► stage 1 ──► X1 ──► stage 2 ──► X2 ──► stage 3 ──► X3
 (1/clk)     (IFFT swap)    64w    R4 x16     64w    R4 x16     64w    R4 x16     64w
                                                                                    │
 bins ◄── fft_unloader ◄── Y ◄────────────── reorder_unit (digit reversal) ◄───────┘
 (1/clk)  (IFFT swap)      64w
```

* Each **frame memory** (`frame_mem`) is a register array of 64 complex words. It has
  four read ports and four write ports, one per butterfly leg. It also holds a *full*
  flag and the frame's direction tag (forward or inverse).
* A **stage** (`fft_stage`) starts when its source memory is full and its destination
  is empty. It then does one butterfly per clock for 16 clocks: four words in, four
  words out. In its last clock it fills the destination and passes the tag on.
* Each of the five memories can hold a different frame, so up to five frames are in
  flight. A unit whose destination is still full waits. This stall propagates back to
  `s_ready_o`.

### How the rate of one sample per clock is kept

Loading and unloading a frame take 64 clocks each, and a stage takes 16. With plain
"start when the destination is empty" control, memory X would be blocked while stage 1
reads it, and Y while the unloader streams it out. That costs 17 clocks per frame. Two
overlaps remove the cost:

1. **Stage 1 releases X with its first butterfly** (parameter `EARLY_DRAIN`). Butterfly
   *j* of stage 1 reads words *j*, *j*+16, *j*+32 and *j*+48. So word *a* is read in
   clock *a* mod 16 of the run. The loader writes word *a* of the next frame in clock *a*
   or later, so nothing is overwritten before it is read. `s_ready_o` stays high through
   the hand-over.
2. **The reorder unit refills Y right behind the read pointer.** It writes Y in natural
   order, four words per step: step *j* writes words 4*j*..4*j*+3 and reads X3 at the
   digit-reversed addresses. It takes a step only when those four words of the old
   frame have been consumed. The unloader reports this count as `y_used_o`. Its last
   step falls in the same clock as the read of the old frame's word 63, so Y refills at
   the same clock edge and the next frame follows without a gap.

Result: a frame enters and leaves every 64 clocks. The latency from the last input
sample to the first output bin is 65 clocks: four units of 16 clocks, plus one clock
for Y to become full.

## The radix-4 butterfly

`r4_butterfly` takes inputs F(0..3, q). It multiplies inputs 1, 2 and 3 by W^q, W^2q
and W^3q, using one complex multiplier (`cmult`) each. It then forms the 4-point DFT

  X(p) = Σ_l b_l · (−j)^(l·p),  p = 0..3,

which needs only additions, subtractions and swaps of real and imaginary parts. Here
W = W_64 = e^(−j2π/64).

## Address mapping

This is the least obvious part of the design. It lives in `fft_pkg`.

The algorithm is decimation in time, computed in place. Twiddles are applied at the
butterfly inputs. The address order is chosen so that the input is in natural order and
the output is in digit-reversed order, which the reorder unit then corrects. Stage
*s* = 0, 1, 2 has stride S = 16, 4, 1. Butterfly *j* (0..15) reads, and writes back to
the same addresses:

  a(j, l) = ⌊j/S⌋·4S + (j mod S) + l·S,  l = 0..3

Its input *l* is multiplied by W_64^(l·q·S). The value of q depends on the stage:

| stage | S  | words of butterfly j          | q                                 | twiddle exponents in use |
|-------|----|-------------------------------|-----------------------------------|--------------------------|
| 1     | 16 | j, j+16, j+32, j+48           | 0                                 | 0 only                   |
| 2     | 4  | 16⌊j/4⌋ + (j mod 4) + 4l       | ⌊j/4⌋                              | 0, 4, …, 36              |
| 3     | 1  | 4j + l                        | j with its two base-4 digits swapped | 0 … 45                |

After stage 3, word *a* holds frequency bin digit_rev(*a*). Here digit_rev reverses
the three base-4 digits of the 6-bit address: {a[1:0], a[3:2], a[5:4]}. This is the
radix-4 form of bit-reversed order. Because the addressing is in place, each stage
writes to the same addresses it read, so no address translation is needed between
memories.

## Number format and accuracy

* Input: signed `IN_W` = 8-bit integers for the real and imaginary parts.
* Every stage widens the word by 3 bits: 2 bits for the sum of four terms and 1 bit
  because a rotation can raise one component by up to √2. The widths are therefore
  8 → 11 → 14 → 17. The output has `IN_W`+9 = 17 bits and cannot overflow, so no scaling
  is applied anywhere.
* Twiddles: signed `TW_W` = 12 bits, with 1.0 = 2¹⁰. They are rounded to nearest and
  computed with `$cos`/`$sin` at elaboration (`twiddle_gen`). ±1 and ±j are exact, so
  stage 1 is exact.
* Products are rounded to nearest. Against a floating-point DFT, the observed error is
  at most about 4 output LSBs on full-scale random frames.
* Forward: out[k] = Σ_n in[n]·e^(−j2πnk/64).
* Inverse: out[n] = Σ_k in[k]·e^(+j2πnk/64). This is 64 times the inverse DFT. The
  1/64 is left to the user: the binary point sits 6 bits further left.

## Inverse transform

Swap the real and imaginary parts of a sequence, take its forward DFT, then swap the
parts again: the result is N times the inverse DFT. The loader swaps at the input and
the unloader at the output. The direction is set per frame: `s_inverse_i` is sampled
with a frame's first sample, travels with the frame through all five memories as the
tag, and is shown at the output on `m_inverse_o`. Forward and inverse frames can follow
each other back to back.

## Interface (`fft64_r4`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (control only, memories are not reset) |
| `s_valid_i`, `s_ready_o` | in/out | 1 | input handshake; a sample is taken when both are high |
| `s_re_i`, `s_im_i` | in | IN_W | input samples, natural time order, 64 per frame |
| `s_inverse_i` | in | 1 | sampled with sample 0 of a frame: 1 = inverse transform |
| `m_valid_o`, `m_ready_i` | out/in | 1 | output handshake |
| `m_re_o`, `m_im_o` | out | IN_W+9 | output bins, natural frequency order |
| `m_last_o` | out | 1 | bin 63 of a frame |
| `m_inverse_o` | out | 1 | the frame is an inverse transform |
| `busy_o` | out | 4 | stage 1, 2, 3 running; reorder unit taking a step |

Parameters: `IN_W` (default 8) and `TW_W` (default 12). The transform length is fixed
at 64 by the stage structure.

The output is combinational from memory Y, and `m_valid_o` stays high while Y holds a
frame. Outputs are held while `m_ready_i` is low. Backpressure then fills the memories
from the back, and finally `s_ready_o` falls.

## Modules

| file | contents |
|------|----------|
| `rtl/fft_pkg.sv` | sizes, direction type, address and twiddle-exponent functions, digit reversal |
| `rtl/fft64_r4.sv` | top level: memories, stages, reorder unit, loader, unloader |
| `rtl/fft_stage.sv` | one radix-4 stage: butterfly counter, address generator, twiddles, butterfly |
| `rtl/r4_butterfly.sv` | twiddle multiplication and 4-point DFT |
| `rtl/cmult.sv` | rounded complex multiplier |
| `rtl/twiddle_gen.sv` | W_64^e as constant logic |
| `rtl/frame_mem.sv` | 64-word multiport frame memory with full flag and tag |
| `rtl/reorder_unit.sv` | digit-reversal copy from X3 to Y, overlapped with the output |
| `rtl/fft_loader.sv` | input stream into X, IFFT swap |
| `rtl/fft_unloader.sv` | Y to output stream, IFFT swap |

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs.

* `tb_twiddle_gen`: all 64 factors within half an LSB of cos/−sin; exact at multiples
  of 90°.
* `tb_cmult`, `tb_r4_butterfly`: bit-exact against models that round each product and
  rotate by −j explicitly.
* `tb_fft_stage`: the three stage configurations, chained on random and full-scale
  frames, bit-exact against a per-stage model. Also checks the wait on a full
  destination, the 16-clock run, the early or late release, and the tag.
* `tb_frame_mem`, `tb_fft_loader`, `tb_fft_unloader`: ports, flags, swap, handshake.
* `tb_reorder_unit`: the permutation, and that no word of the old frame in Y is
  overwritten before it is read.
* `tb_fft64_r4`: the whole processor at its default parameters. It streams 24 frames:
  impulse, full-scale constant, alternating full-scale and random, 10 of them inverse.
  It compares all bins with a floating-point DFT (tolerance 8 LSBs) and checks the
  65-clock latency, the 64-clock frame period, the 16 clocks per stage and the
  `m_last_o`/`m_inverse_o` flags. It also counts input and output backpressure, stalled
  units, both overlaps and direction switches, and fails if any of them never occurs.
* `tb_ofdm_roundtrip`: the OFDM use of the processor. It takes 64 random QPSK subcarrier
  symbols (±100 ± j100) through the inverse transform, scales by 1/64 (a rounded 6-bit
  shift) into 8-bit time samples, and applies the forward transform on the same
  instance. Every symbol must come back within 16 LSBs, with its signs right; the
  largest error seen is about 9.

Concurrent assertions in the RTL check the handshake rules while any of these run. The
output word must stay stable until it is taken (`fft_unloader`). A frame may only be
filled into an empty memory, or into one released in the same clock (`frame_mem`). A
stage's source and destination may not change hands during its run (`fft_stage`).

To run one, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fft_pkg.sv tb/tb_fft64_r4.sv \
          --top-module tb_fft64_r4 -Mdir obj_top -o sim
./obj_top/sim
```

The other testbenches are built the same way: replace both `tb_fft64_r4` names. Each
runs in well under a second.

## Departures from the source description, and limits

* The source description's butterfly drawing puts the twiddles on the butterfly inputs,
  which is the decimation-in-time form. The drawing is nevertheless titled DIF. This
  design follows the drawing. Its order (natural in, digit-reversed out, then reorder)
  matches the block diagram.
* The word lengths are chosen here: 8-bit input, read from the source's simulation
  waveforms, and 12-bit twiddles. The growth of 3 bits per stage is also this design's
  choice. The source says nothing about scaling.
* The address mapping, the full/empty control and the two overlaps are this design's
  own. The source only states the goal of one clock per sample.
* The source's simulation shows 64 parallel 8-bit signals. This design streams
  instead: one complex sample per clock in and out, with valid/ready.
* Idle units are not clock-gated. They only stop writing, so a power-oriented
  implementation would add clock gating per unit.
* Each memory is four-ported registers. A version for SRAM macros would need banking
  (e.g. four banks selected by address digits). That is not done here.
* The OFDM transceiver around the FFT is not part of this RTL. The source mentions a
  mapper, cyclic-prefix insertion and removal, an equalizer, a demapper and the RF
  front end only as background.
