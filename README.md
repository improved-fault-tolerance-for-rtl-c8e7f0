# Soft-error-tolerant pipelined FFT: parity FFT + Parseval checks as a Hamming code

Four independent complex data streams are each transformed by an 8-point
FFT. Any one of the four FFTs may be hit by a soft error (a transient bit
flip) that corrupts its output. The design finds which FFT is wrong and
repairs its output frame. It needs only **one** extra FFT for this, and each
FFT is a **pipelined** FFT with one butterfly per stage instead of a fully
parallel one. That saves most of the area.

Two properties of the DFT make this work:

* **Linearity.** The FFT of `x1 + x2 + x3 + x4` equals `X1 + X2 + X3 + X4`.
  So a fifth "parity" FFT on the summed input can rebuild any one output:
  `X1 = X - X2 - X3 - X4`.
* **Parseval's theorem.** For an unscaled N-point DFT,
  `sum |X(k)|^2 = N * sum |x(n)|^2`. A stream can be checked without a
  second FFT by comparing the energies of its input and output frames. This
  is a sum-of-squares (SOS) check.

Checking each stream with its own SOS check would need four checks. Instead
the checks are applied to encoded sums of streams, chosen like the parity
bits of a Hamming code:

| check | input side       | output side      | covers streams |
|-------|------------------|------------------|----------------|
| c1    | x5 = x1 + x2 + x3 | X5 = X1 + X2 + X3 | 1, 2, 3 |
| c2    | x6 = x1 + x2 + x4 | X6 = X1 + X2 + X4 | 1, 2, 4 |
| c3    | x7 = x1 + x3 + x4 | X7 = X1 + X3 + X4 | 1, 3, 4 |

Each stream sets a different pattern of failing checks:

| {c1,c2,c3} | meaning | action |
|-----------|---------|--------|
| 000 | no error | pass all streams |
| 111 | stream 1 wrong | Y1 = X - X2 - X3 - X4 |
| 110 | stream 2 wrong | Y2 = X - X1 - X3 - X4 |
| 101 | stream 3 wrong | Y3 = X - X1 - X2 - X4 |
| 011 | stream 4 wrong | Y4 = X - X1 - X2 - X3 |
| 100, 010, 001 | no single stream explains it | pass unchanged, raise `uncorrectable` |

The checks never look at the parity FFT. An error in the parity FFT
therefore triggers nothing and does not reach the outputs. It could only
matter if it hit the same frame as a correction.

The reverse case is harmless too. If an upset inside a check produces a
table syndrome although the data are clean, the "faulty" stream is rebuilt
from the parity FFT. The rebuilt values are identical to the original ones.

## Block diagram

```
 x1..x4 ──┬──────────────► pipelined_fft ×4 ──► Z1..Z4 ──┬──────────────► error_corrector ──► Y1..Y4
          │                                             │                    ▲      ▲
          ├─► input_encoder ─ x = Σxi ─► pipelined_fft ─┼──── P (parity) ────┘      │
          │        │                                    ▼                           │
          │        └─ x5,x6,x7 ─► parseval_check ×3 ◄── output_encoder (X5,X6,X7)  │
          │                            └──────────── {c1,c2,c3} ────────────────────┘
```

The top level is `sos_ecc_pipelined_fft` (`rtl/sos_ecc_pipelined_fft.sv`).

## The pipelined FFT (`pipelined_fft`)

The FFT takes one complex sample per enabled clock and gives one out per
enabled clock. It is a radix-2² single-delay-feedback (SDF) pipeline: each
of the log2(8) = 3 stages is one butterfly with a feedback shift register.

```
in ─► Butterfly I (4-word FB) ─► Butterfly II (2-word FB, −j) ─► ×W8^e ─► Butterfly I (1-word FB) ─► reg ─► out
```

**Butterfly I** (`butterfly_1`) runs in two phases of DEPTH samples each,
selected by `c1`:

* `c1 = 0`: the incoming sample goes into the feedback register. The word
  leaving the register goes to the output.
* `c1 = 1`: the word leaving the register, `a = x(n)`, meets the incoming
  sample `b = x(n+DEPTH)`. The sum `a + b` goes to the output. The
  difference `a − b` goes back into the register. It comes out during the
  next `c1 = 0` phase, while new samples are loaded.

So a stream of samples becomes a stream of sums followed by a stream of
differences, with no idle cycles.

**Butterfly II** (`butterfly_2`) works the same way, but can multiply the
incoming sample by −j first. This is the only twiddle factor this stage
needs. Multiplying by −j needs no multiplier: `−j(r + j·i) = i − j·r`. A
"swap mux" exchanges the real and imaginary parts. The sign change is made
by swapping the roles of the adder and the subtractor on the imaginary
path. The rotation applies while `c1 = 1` and `c2 = 1`. `c2 = 1` marks the
samples that came from the difference half of the previous Butterfly I.

**Twiddle multiplier** (`twiddle_mult`). Between stages 2 and 3 the sample
is multiplied by `W8^e` with `e = n3·(k1 + 2·k2)` ∈ {0, 1, 2, 3}:

* `e = 0` and `e = 2` (×1 and ×−j) are exact.
* `e = 1` and `e = 3` use one constant, `C = round(cos(π/4)·2^16)`.

The product keeps all 16 fractional bits. Nothing is rounded anywhere in
the FFT. This matters: with no rounding the FFT is exactly linear. The
parity FFT output then equals the sum of the four stream outputs bit for
bit, so a rebuilt stream is exactly what the healthy FFT would have given.

**Control.** One 3-bit sample counter `t` drives all three stages. Each
stage sees its data later than the previous one, by the previous stage's
feedback depth:

| stage | frame index of its input | control |
|-------|-------------------------|---------|
| Butterfly I (4) | t | `c1 = t[2]` |
| Butterfly II (2) | t − 4 | `c1 = t[1]`, `c2 = ~t[2]` |
| twiddle, Butterfly I (1) | u = t − 6 | `e = u[0] ? 2·u[1] + u[2] : 0`, `c1 = u[0]` |
| output | t − 7 | bin `k = bitrev(t − 7)` |

**Output order and latency.** Bins leave in bit-reversed order: X0, X4, X2,
X6, X1, X5, X3, X7. `out_k` names each bin. X0 of a frame is registered on
the clock that takes x7 of the same frame, so the latency is 8 samples. The
feedback registers are full of the current frame at that moment. A frame is
therefore flushed by feeding the next one. Outputs are 28 bits for 8-bit
inputs: 12 integer bits plus 16 fractional bits.

## Parseval checks (`parseval_check`)

Each check keeps two running energies. Each energy is a sum of
`re² + im²`:

1. It accumulates the input energy over each input frame of 8 samples,
   then holds the total.
2. It accumulates the output energy over the matching output frame. The
   output frame arrives 8 samples later, overlapping the next input frame.
3. On the last output sample it compares `E_out` with
   `8 · E_in · 2^32`. The factor `2^32` accounts for the 16 fractional bits
   of the outputs, squared.

The check fires if the difference exceeds `THRESH · 2^32`, with
`THRESH = 256` (in units of squared input LSBs). The threshold covers the
small energy error from the quantised cos(π/4): 1.1·10⁻⁶ relative, at most
about 20 units at full scale.

Consequences:

* Errors that change a frame's output energy by less than the threshold are
  not detected. A soft error in a low-order bit is the typical case. This
  limit is inherent in sum-of-squares checking.
* The end-to-end test injects errors of at least 8 LSBs in the integer
  part; every one of them was detected.
* An error can also change a component in a way that leaves the energy
  almost unchanged, for example a sign flip. Such an error is missed as
  well.

The result is a one-cycle pulse `chk_valid`, together with `chk_err`, in
the cycle after a frame's last output sample.

## Error detection and correction (`error_corrector`)

The checks can judge a frame only after its last sample. So the corrector
holds Z1..Z4 and P in an 8-sample delay line. Each sample of the next frame
pushes one sample of the judged frame out. On the way out:

* the frame's syndrome is decoded with the table above (`fft_pkg::decode_syndrome`);
* the faulty stream is replaced by `P` minus the other three streams;
* all four streams are rounded to nearest and saturated to 16 bits.

The syndrome is used from the very cycle its `chk_valid` pulse arrives.
That is also the earliest cycle in which the first sample of the frame can
leave. The delay line therefore needs no extra slack.

## Top-level interface (`sos_ecc_pipelined_fft`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` | in | 1 | `x_re/x_im` hold one sample of every stream |
| `x_re[4]`, `x_im[4]` | in | 8 | inputs x1..x4, two's complement |
| `inj_en`, `inj_ch`, `inj_re`, `inj_im` | in | 1, 3, 28, 28 | test only: XOR a mask onto the output of FFT `inj_ch` (0–3 streams, 4 parity) |
| `y_valid` | out | 1 | one output sample of every stream |
| `y_k` | out | 3 | bin index (bit-reversed order) |
| `y_re[4]`, `y_im[4]` | out | 16 | protected outputs Y1..Y4, integer, rounded |
| `syndrome` | out | 3 | {c1,c2,c3} of the frame being output |
| `err_loc` | out | `err_loc_e` | `LOC_NONE`, `LOC_Z1`..`LOC_Z4`, `LOC_UNCORR` |
| `err_detected`, `uncorrectable` | out | 1 | syndrome ≠ 000; syndrome outside the table |

Protocol and timing:

* After reset, present frames back to back on `in_valid` cycles: samples
  x(0)..x(7) of each stream on consecutive valid cycles.
* `in_valid = 0` stalls the whole design.
* Output position j of frame f is computed on the clock after the valid
  clock that takes input sample `8(f+1)+j+7`, counted from reset. It is
  visible with `y_valid` in the cycle after that.
* Without stalls, that is 16 samples plus two clocks after its input
  position entered. The FFT accounts for 8 samples and the corrector's frame
  buffer for 8 more.
* Two more frames of any data flush the last real frame out.

Parameters of the top: `IN_W = 8`, `OUT_W = 16`, `TW_F = 16` (twiddle
fractional bits), `THRESH = 256`. The transform length is fixed at 8.
`FFT_N` in `fft_pkg` is used by the checks and the corrector, but the FFT's
stage structure and counter are written for 8 points.

## What is taken from the source design and what is not

Taken from the source design:

* the overall arrangement: four FFTs, the encoders, three SOS checks, the
  parity FFT and the correction unit;
* the syndrome table and the correction by the parity FFT;
* the Butterfly I / Butterfly II structures, with feedback registers and a
  swap mux for −j;
* the 8-point transform, 8-bit inputs and 16-bit outputs.

Choices made in this implementation:

* **−j control polarity.** The source text states the swap for `C1 = 0,
  C2 = 1`. That does not give a correct FFT with the Butterfly I phase
  convention (`C1 = 1` is add/subtract). This RTL swaps on `c1 = 1,
  c2 = 1`.
* **Twiddle multiplier.** The general multiplier between stages 2 and 3, the
  counter-based control, the bit-reversed output order and the output
  register are not specified by the source.
* **Full precision.** The FFT keeps full precision (16 fractional bits) and
  rounds only at the final outputs, so that parity correction is exact.
* **Threshold.** The SOS threshold value (256) and the frame-wise
  energy bookkeeping are this implementation's.
* **Uncorrectable syndromes.** The handling of syndromes outside the table
  is this implementation's.
* **Handshake and extra ports.** The `in_valid` handshake, the
  soft-error injection port and the status outputs are additions. The
  source's top level has only the 8-bit inputs, the 16-bit outputs, clock
  and reset.
* **Reset.** Synchronous active-low reset of all state.

The source also describes three earlier schemes as baselines. They are not
part of this RTL:

* four FFTs plus three redundant FFTs (Hamming code on whole FFTs);
* one SOS check per FFT plus a parity FFT;
* the same SOS-Hamming scheme built with parallel FFTs.

The source reports FPGA utilisation for its build, but those numbers
depend on its vendor flow and are not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
ends by printing `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|-----------|----------------|
| `tb_butterfly_1`, `tb_butterfly_2` | sums and differences (with and without −j) against integer arithmetic, with random stalls |
| `tb_twiddle_mult` | all four exponents against floating-point complex multiplication |
| `tb_pipelined_fft` | 41 frames against a floating-point DFT, bit-reversed order, 8-sample latency, stalls |
| `tb_input_encoder`, `tb_output_encoder` | the sums, including extreme values |
| `tb_parseval_check` | quiet on exact DFT frames and on sub-threshold errors; fires on large errors; one pulse per frame |
| `tb_error_corrector` | every syndrome of the table, uncorrectable syndromes, false syndromes on clean data, saturation, late syndrome arrival, stalls |
| `tb_sos_ecc_pipelined_fft` | whole design at default parameters (see below) |

`tb_sos_ecc_pipelined_fft` runs 60 frames of four random streams at the
default parameters. Frame 0 is the ramp 1..8 on every stream. Each frame
gets one of these scenarios:

* clean;
* a large soft error injected into one of the four stream FFTs, on random
  bins;
* a soft error in the parity FFT.

Random stall cycles are added. The test checks:

* every output against a floating-point DFT, within 1 LSB;
* the syndrome and error location of every frame;
* the bin order and the latency;
* that every scenario occurred.

The uncorrectable path is exercised only in the corrector's own test: a
single stream error cannot produce those syndromes.

To run a testbench with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_sos_ecc_pipelined_fft.sv \
          -y rtl --top-module tb_sos_ecc_pipelined_fft
./obj_dir/Vtb_sos_ecc_pipelined_fft
```

Replace the testbench name to run another one. The top contains one
concurrent assertion: all five FFTs and the three checks must stay in lock
step.

## Limits

* Single-error correction per frame. Two faulty streams in one frame give a
  wrong location. For example, streams 2 and 3 together give 111, which is
  read as stream 1.
* Errors below the SOS threshold are missed (see above).
* The threshold is absolute. With much wider inputs it would have to grow
  with the signal energy.
* Errors inside the checkers, the encoders or the corrector are not covered.
