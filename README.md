# Fault-tolerant parallel FFT with Parity-SOS-ECC protection

Four FFTs run side by side, as in the demodulator of a 4×4 MIMO-OFDM
receiver, and each may be hit by a soft error. Triplicating all of them (TMR)
costs more than 200 % extra area. This design protects all four with
**one extra FFT and three sum-of-squares checks**, and still corrects any single
faulty FFT. The method combines two ideas.

* **Parity FFT (correction).** The DFT is linear. An extra FFT fed with
  `x = x1 + x2 + x3 + x4` therefore produces `X = X1 + X2 + X3 + X4`, so any one
  output can be rebuilt from the other three. For example, `Y1 = X − X2 − X3 − X4`.
* **Parseval checks arranged as a Hamming code (location).** Parseval's theorem
  says that `Σ|X[k]|² = N · Σ|x[n]|²`. A sum-of-squares (SOS) check compares
  the two sides for one FFT. This design does not spend one check per FFT.
  Instead, three checks watch the sums of three channels each:

  | check | input side            | output side           |
  |-------|-----------------------|-----------------------|
  | P1    | x5 = x1 + x2 + x3     | X5 = X1 + X2 + X3     |
  | P2    | x6 = x1 + x2 + x4     | X6 = X1 + X2 + X4     |
  | P3    | x7 = x1 + x3 + x4     | X7 = X1 + X3 + X4     |

  By linearity, `X5` is the FFT of `x5`, so each check holds while no FFT is
  faulty. A faulty FFT breaks exactly the checks that contain it:

  | P1 P2 P3 | meaning                         | action                         |
  |----------|---------------------------------|--------------------------------|
  | 000      | no error                        | pass                           |
  | 111      | FFT 1                           | Y1 = X − X2 − X3 − X4          |
  | 110      | FFT 2                           | Y2 = X − X1 − X3 − X4          |
  | 101      | FFT 3                           | Y3 = X − X1 − X2 − X4          |
  | 011      | FFT 4                           | Y4 = X − X1 − X2 − X3          |
  | 100, 010, 001 | error in a check's own path | pass (data are good)          |

For K channels, the overhead is one FFT plus 1 + log2 K checks. Protecting each
FFT with its own check would need K checks, and a pure Hamming code over the
FFTs would need 1 + log2 K extra FFTs. This RTL is built for K = 4.

What the scheme cannot do:

* It corrects one faulty FFT per frame.
* The SOS check has a tolerance (below), so an error too small to move the sum
  of squares past it goes undetected.
* An error in the parity FFT does nothing. It is only read when a data FFT is
  being rebuilt.
* An error in a check's own path shows up as a single-bit syndrome and
  is ignored.

## Block structure

```
 x1..x4 ─┬──────────────► fft16 ×4 ──► X1..X4 ─┬───────────────────────────► edc ×3 ─► vote ─► Y1..Y4
         │                                      └► ecc_encoder ×3 ─► vote ─► X5,X6,X7 ─┐   ▲
         └► ecc_encoder ×3 ─► vote ─► x5,x6,x7 ─────────────────────────────────────────┤   │
                                   └► x ──► fft16 (parity, 18-bit) ──► X ───────────────┼───┘
                                                               parseval_check ×3 ◄──────┘ ─► P1 P2 P3 ─► edc
```

| module             | role |
|--------------------|------|
| `pfft_sos_ecc_top` | the whole protected parallel FFT |
| `fft16`            | one 16-point sequential FFT core (five instances) |
| `fft_addr_gen`, `dp_ram`, `fft_selector`, `fft4`, `cordic`, `twiddle_gen` | parts of the FFT core |
| `ecc_encoder`      | forms the check sums (x5, x6, x7 and the parity input x; X5, X6, X7) |
| `parseval_check`   | SOS check: `mag_square` → `sos_accum` on each side, then `mag_compare` |
| `edc`              | error detection and correction: frame buffer, syndrome decode, rebuild |
| `tmr_voter`        | bitwise 2-of-3 majority |
| `ripple_adder`     | adder used by `ecc_encoder`: `half_adder` + `peres_full_adder` chain |
| `peres_full_adder`, `peres_gate`, `half_adder`, `full_adder` | one-bit adder cells |
| `pfft_pkg`         | FFT length, phase-word width, syndrome patterns, `err_loc_e` |

The protection logic is itself hardened. A soft error in the adders that form
the check sums, or in the detection/correction unit, could reach the outputs
directly. So the input-side encoder, the output-side encoder and `edc` are each
instantiated three times and followed by a majority voter. The parity FFT
and the three checks are not triplicated, because an error in them cannot
corrupt a data output.

## The FFT core (`fft16`)

Each channel is a 16-point FFT that takes one complex sample per cycle and
gives one bin per cycle. It is built around a single radix-4 butterfly:

* **Address generator** (`fft_addr_gen`) sequences everything below.
* **Selector** (`fft_selector`) chooses the RAM write data: the input sample,
  or the rotated result coming back from the CORDIC.
* **Dual-port RAM** (`dp_ram`) holds the 16 samples.
* **Serial 4-point FFT** (`fft4`) reads its inputs from the RAM.
* **CORDIC** (`cordic`) multiplies by the twiddle factors.
* **Rotation factor generator** (`twiddle_gen`) supplies the twiddle angles.

The algorithm is decimation in frequency with `n = n1 + 4·n2` and
`k = k1 + 4·k2`, in two in-place passes:

1. For each `n1`, take the 4-point DFT of `x[n1], x[n1+4], x[n1+8], x[n1+12]`.
   Rotate bin `k1` by `W16^(n1·k1)` in the CORDIC and write it back to address
   `n1 + 4·k1`, which is the address it was read from.
2. For each `k1`, take the 4-point DFT of addresses `4·k1 .. 4·k1+3`. Its `k2`-th
   bin is `X[k1 + 4·k2]` and goes straight to the output.

The bins therefore leave in digit-reversed order. `out_idx` names each bin, and
`edc` stores by index, so the protected outputs come out in natural order.

The schedule is fixed. `t` counts cycles from the cycle that carries `start`
and `x[0]`:

| t       | activity |
|---------|----------|
| 0–15    | load `x[t]` into RAM address `t` (`in_take`) |
| 16–31   | pass-1 RAM reads (registered read, 1 cycle) |
| 17–32   | `fft4` inputs; bin `j` leaves `fft4` 4 cycles after input `j` |
| 21–33   | factor starts for `n1 = 0..3`; CORDIC input |
| 22–37   | CORDIC results (1 cycle) written back |
| 38–53   | pass-2 RAM reads |
| 43–58   | `out_en`, bins out |

`busy` is high on cycles 1–58. A `start` while busy is ignored, so a new frame
can begin at t = 59.

**No scaling.** Every addition grows the word. The data path is 16 bits in,
19 bits in the RAM and 21 bits out. The parity FFT, whose input is 18 bits,
outputs 23 bits. The FFT output is therefore the exact DFT up to the rounding
of the twiddle products. The tests measured at most 1 LSB of error per
component; 2 LSB is the analytic bound. This matters, because the Parseval
check can only be as tight as the FFT is exact.

**CORDIC.** The CORDIC works in these steps:

1. The angle is a 24-bit phase word, where the full circle is 2^24.
2. It is first reduced to ±45° by an exact rotation by a multiple of 90°.
3. Twenty unrolled micro-rotations follow, on values with 6 guard bits.
4. The gain is removed with the constant K = 0.6072529350, coded as
   10188014 / 2^24.
5. The result is rounded and registered.

The phase precision and the number of iterations are what make the 1-LSB
accuracy possible. With a 16-bit phase and 14 iterations, the error grows to
tens of LSB, and the SOS tolerance would have to grow with it.

## The Parseval check and its tolerance

`parseval_check` squares and accumulates the 16 input-side samples
(`x5` etc., 18 bits), then the 16 output-side samples (`X5` etc., 23 bits). It
then compares `16·Σ|x|²` with `Σ|X|²`. The flag is
`p = |Σ|X|² − 16·Σ|x|²| > TOL`.

The rounding errors e[k] of the FFT disturb the output sum by about
`Σ 2·|X[k]|·|e[k]|`. For a sum of three full-scale 16-bit channels this stays
below 2^31, and `TOL` defaults to 2^32. An injected error of size d in the real
part of bin k changes the sum by `2·Re(X[k])·d + d²`. This is far above 2^32
for errors in the upper output bits. It can fall below the tolerance for small
errors, or in the rare case where `Re(X[k]) ≈ −d/2`. Such errors go
undetected, so the check catches most errors but not all. With small input
signals a lower tolerance (`SOS_TOL` on the top) can be used.

`tb_fault_campaign` measures the consequence with full-scale random data,
injecting one flipped bit into the real part of one bin of one data FFT per
frame. Over 50 frames per bit position (one run; the counts vary a little
with the random seed):

| flipped output bit | frames fully recovered |
|--------------------|------------------------|
| 19, 20             | 100 % |
| 18                 | 98 % |
| 17                 | 86 % |
| 16                 | 70 % |
| 14, 15             | 12 % to 32 % |
| 2 to 13            | 0 % (the change stays under the tolerance) |
| 0, 1               | harmless: the output stays within 2 LSB |

Partial detection has a second consequence. When an error is near the
tolerance, only some of the checks that cover the faulty FFT may fire. The
syndrome can then name a different FFT, and that FFT is wrongly rebuilt. This
happened in 8 of 1050 frames. Detection can only be made finer by shrinking
the FFT rounding, for example by keeping fraction bits in the FFT outputs, and
then lowering `TOL`.

The input frame must finish before the output frame. It does: the checks take
their input side from the FFT input stream (`in_take`) and their output side
from the output stream. `p_valid` pulses 2 cycles after the last bin, at t = 60.

## Detection and correction (`edc`)

The checks can only report after the last bin of a frame. `edc` therefore
stores the whole frame of X1..X4 and the parity output X, 16 entries of
214 bits, written by bin index. When the syndrome arrives it reads the frame
out in natural order, one bin per cycle. It replaces the located channel by
`X` minus the other three. The cost of the scheme is this frame of latency.

The first corrected bin appears at t = 63 and the last at t = 78. `err_loc`
(`pfft_pkg::err_loc_e`) and `corrected` are valid from t = 61 until the next
frame's syndrome.

The buffer has one bank. This is enough because frames are at least 59 cycles
apart: the next frame's first bin (t ≥ 102) comes after this frame's readout
ends.

## Reversible adders

The check-sum adders are ripple-carry adders (`ripple_adder`), with a half
adder in bit 0 and a full adder built from two Peres gates in every other bit:

* `peres_gate` maps (A, B, C) to (A, A⊕B, AB⊕C).
* The first Peres gate in a full adder takes (A, B, 0) and gives A⊕B and AB.
* The second takes (A⊕B, Cin, AB) and gives S = A⊕B⊕Cin and
  Cout = (A⊕B)·Cin ⊕ AB.
* The garbage outputs (A and A⊕B) are brought out and left unused.

Set `PERES = 0` for conventional `full_adder` cells instead. Synthesis maps
both to ordinary logic. The reversible structure is kept for the
structural comparison.

## Top-level interface (`pfft_sos_ecc_top`)

Parameters: `DW = 16` is the sample width. `SOS_TOL = 2^32` is the check
tolerance. The FFT length of 16 is fixed in `pfft_pkg`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | frame start; `x[0]` of all channels on this cycle, `x[1..15]` on the next 15 |
| `x_re[4]`, `x_im[4]` | in | 16 | samples of channels 1–4, two's complement |
| `busy` | out | 1 | frame in progress |
| `chk_valid` | out | 1 | checks report (t = 60) |
| `syndrome` | out | 3 | {P1, P2, P3} |
| `err_loc` | out | 3 | 0 none, 1–4 FFT 1–4, 5 check path |
| `corrected` | out | 1 | a channel was rebuilt in this frame |
| `y_valid`, `y_idx` | out | 1, 4 | corrected bin, natural order, t = 63..78 |
| `y_re[4]`, `y_im[4]` | out | 21 | Y1..Y4 = DFT of x1..x4 |
| `inj_en`, `inj_sel`, `inj_idx`, `inj_mask` | in | 1, 3, 4, 23 | fault injection (below) |

Fault injection is for testing. While `inj_en` is high, `inj_mask` is XORed
into the real part of bin `inj_idx` of one target:

* `inj_sel` 0–3 selects data FFT 1–4.
* `inj_sel` 4 selects the parity FFT.
* `inj_sel` 5–7 selects the check sum X5, X6 or X7, after its voter.

Tie `inj_en` low in use.

## Where this RTL departs from or goes beyond the published scheme

The protection scheme is taken as published. That covers the parity FFT, the
three check combinations, the syndrome table, the correction equation and TMR
on the adders and on detection/correction. So is the FFT core's block
structure (selector, dual-port RAM, 4-point FFT, CORDIC, rotation factor
generator, address generator) and the Peres-gate adders. The following are
this design's own choices, because the published description leaves them open:

* The FFT length of 16 points. It is fixed by the two-pass schedule: the
  address generator and the twiddle generator are written for 16 points.
* 16-bit samples and unscaled internal word growth.
* The cycle schedule, the serial 4-point FFT interface and the sample-per-cycle
  streaming interface.
* The CORDIC internals: 24-bit phase, 20 iterations, gain correction.
* The absolute SOS tolerance of 2^32. The published figure of "tolerance 1"
  has no stated unit.
* The frame buffer in `edc` and the treatment of single-check syndromes.
  Those patterns name a redundant element, and no data is changed.
* The fault-injection port.

Not implemented:

* The reversible PFLAG-gate multiplier mentioned for the extended design. Its
  gate function is not specified.
* Channel counts other than four.
* The baseline schemes this one is compared with: the pure Hamming-code scheme
  with three redundant FFTs, and one SOS check per FFT.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
prints `TB_RESULT checks=<n> failures=<n>`:

* **Gates and adders**: exhaustive or random tests against `+`.
* **FFT parts**: `fft4` against an integer 4-point DFT, including bin timing.
  `cordic` against floating-point rotation, within 1 LSB. `fft_addr_gen` is
  checked cycle by cycle against the schedule above.
* **`fft16`**: 43 frames (random, full-scale, alternating extremes, impulse)
  against a double-precision DFT, within 4 LSB, plus output timing.
* **`parseval_check`**: the flag is compared with the exact integer SOS
  difference. Frames with large, small and no errors are covered.
* **`edc`**: every syndrome pattern is applied, and the rebuilt channel is
  compared bit-exactly.
* **`tb_pfft_sos_ecc_top`**: runs the full design at its default size for
  74 frames with random 16-bit data on all four channels. Each frame is clean,
  or has one injected error in a data FFT, the parity FFT or a check sum. It
  checks the syndrome, `err_loc`, `corrected`, the timing and all 64 outputs
  against a floating-point DFT. It counts that every mechanism occurred:
  clean frames, correction of each of the four FFTs, an ignored parity fault
  and an ignored check fault.

`tb_pfft_stream` starts a new frame every 59 cycles, the fastest rate `busy`
allows, for 24 frames. The outputs of each frame leave while the next frame is
loading, and every other frame carries an injected error. It checks each
frame's syndrome and all of its outputs against that frame's own reference
DFT. This confirms that the single frame buffer in `edc` is enough at full rate.

`tb_fault_campaign` is the coverage measurement above. It also checks each
check's flag against the sum-of-squares change predicted from the reference
DFT, and it checks that every correctly located error is corrected.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/pfft_pkg.sv tb/tb_pfft_sos_ecc_top.sv \
          --top-module tb_pfft_sos_ecc_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run any other test. Lint with
`verilator --lint-only -Wall -Irtl rtl/pfft_pkg.sv rtl/pfft_sos_ecc_top.sv`.
The only warning left is the unused carry out of the top bit of the ripple
adders. It is intended, since the operands are sign-extended beforehand.
