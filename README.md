# Fault-tolerant parallel FFTs: Parseval detection, Hamming-code correction

Systems such as MIMO-OFDM receivers run several identical FFTs side by side.
Protecting each one with triple modular redundancy costs more than twice the
area. This design protects four parallel FFTs at lower cost by combining two
algorithmic checks:

* **Detection (Parseval / sum of squares).** For an unscaled N-point DFT,
  sum |X[k]|^2 = N · sum |x[n]|^2 over a frame. A check on each FFT compares
  the two sums. A mismatch flags that FFT as faulty.
* **Correction (Hamming code over the FFTs).** Three redundant FFTs transform
  sums of the original inputs. Because the DFT is linear, their outputs are the
  same sums of the original outputs. A flagged output can therefore be rebuilt
  from a redundant output minus the other members of its sum.

The Parseval checks say *which* FFTs are wrong. The code only has to fill in
known positions (erasures), not find them. A distance-3 Hamming code can fill
two erasures, so the design corrects errors in up to **two** of the four FFTs
at once. A single parity FFT could correct only one.

## The code

FFTs 1–4 are the protected ones. FFTs 5–7 are redundant. Each redundant FFT
belongs to one check:

| check | redundant FFT input | relation the outputs satisfy |
|-------|---------------------|------------------------------|
| C1    | X5 = x1 + x2 + x3   | Z5 = Z1 + Z2 + Z3            |
| C2    | X6 = x1 + x2 + x4   | Z6 = Z1 + Z2 + Z4            |
| C3    | X7 = x1 + x3 + x4   | Z7 = Z1 + Z3 + Z4            |

Comparing each relation on the received values gives a 3-bit syndrome C1 C2 C3.
An error in a single output shows up as that output's column of the
parity-check matrix:

| syndrome | 000  | 111 | 110 | 101 | 011 | 100 | 010 | 001 |
|----------|------|-----|-----|-----|-----|-----|-----|-----|
| error in | none | Z1  | Z2  | Z3  | Z4  | Z5  | Z6  | Z7  |

The matrix lives in `ft_pkg::H_COL`. The encoder and the corrector both read it
from there.

### Rebuilding flagged outputs

With one flagged output Zi, any check that contains Zi works. For example:
Z1 = Z5 − Z2 − Z3.

With two flagged outputs, each one needs a check whose other members can be
trusted:

| flagged | first rebuild        | second rebuild                 |
|---------|----------------------|--------------------------------|
| Z2, Z3  | Z2 = Z6 − Z1 − Z4    | Z3 = Z7 − Z1 − Z4              |
| Z2, Z4  | Z2 = Z5 − Z1 − Z3    | Z4 = Z7 − Z1 − Z3              |
| Z3, Z4  | Z3 = Z5 − Z1 − Z2    | Z4 = Z6 − Z1 − Z2              |
| Z1, Zx  | Z1 from the check without Zx | Zx from any of its checks, using the rebuilt Z1 |

Z1 is in every check. So when Z1 is one of the pair, Z1 is rebuilt first, and
the second output is rebuilt from the new Z1. `ecc_corrector` visits Z1 first
and does this in one combinational pass.

With three or four flags, the outputs pass through unchanged and
`uncorrectable` is raised.

### What the scheme does not cover

* **Errors that keep the sum of squares.** Examples are a sign flip, or
  swapping the real and imaginary parts of a bin. The Parseval check does not
  see them, so they reach the output uncorrected. This is inherent in the check.
  The syndrome still shows them, but the corrector does not act on it.
* **Errors in a redundant FFT.** When no original is flagged, they never reach
  the outputs. They only show in the syndrome. If an original is flagged at the
  same time, its rebuild may use the bad redundant output and be wrong.
* **Errors in the protection logic.** A false Parseval flag makes the
  corrector rebuild an output that was already right. The rebuild is correct,
  so the data stay right. A missed flag behaves like an undetected FFT error.
  An error inside the corrector, however, would reach the outputs directly.
  The corrector is therefore built three times, and a bitwise majority vote
  picks each output (`tmr_corrector`, parameter `TMR = 1`). The Parseval checks
  are not triplicated.

## Data path and timing

```
x1..x4 ──┬──► FFT1..FFT4 ──► Z1..Z4 ──────────────┐
         │        │                               ▼
         │        └──► sos_check ×4 ── flags ──► ecc_corrector ──► y1..y4
         │                                        ▲
         └──► ecc_encoder ──► FFT5..FFT7 ──► Z5..Z7
```

* **`fft_core`.** A radix-2 FFT that takes one complex sample per cycle. Its
  size is set by the `LOG2N` parameter; the default is 4 points. After the
  last sample of a frame, a decimation-in-time butterfly network computes all
  bins. The bins leave in natural order on the next N cycles. A new frame can
  enter while the previous one leaves, so throughput is one sample per cycle.
  The transform is unscaled: 12-bit inputs give 14-bit outputs at 4 points,
  and 14-bit redundant inputs give 16-bit outputs.
* **Rotation factors.** The FFT does not store its rotation factors as
  constants. After reset, a generator computes the table
  W_N^k = exp(−j2πk/N), k = 0..N/2−1. It starts from 1 and multiplies by the
  base rotation once per cycle, storing each result in a register. Every stage
  takes its factors from this table. `ready` rises when the table is complete:
  N/2 − 1 cycles after reset, which is one cycle at 4 points. The factors have
  16 bits with 14 fraction bits, and products are rounded. At 4 points the
  factors are 1 and −j, which are exact, so the transform is exact and
  Parseval's relation holds exactly. Larger sizes are within a few LSB of the
  exact DFT: 3 LSB at 16 points.
* **`sos_check`.** Two accumulators add re² + im² of the input and output
  samples. The input total moves to a holding register at the end of the input
  frame, so input frame f+1 can overlap output frame f. With the last output
  bin, the output sum is compared with 4× the input total. The accumulators
  are 39 bits wide. The flag is valid one cycle after the last bin. The
  threshold parameter `THRESH` is 0 because the FFT is exact. A rounding FFT
  would need a tolerance.
* **`ecc_encoder`.** Combinational. It forms X5..X7 with exact two's-complement
  sums.
* **`ecc_corrector`** (three voted copies in `tmr_corrector`). The flags of a
  frame exist only after its last bin.
  So all seven streams pass through a 4-deep shift register. The flags arrive
  just as the frame's first bin reaches the end of that register. They are used
  for that bin and held for the other three. Outputs, syndrome and status are
  registered.

Latency from the last input sample of a frame to bin k of its corrected output:
1 (FFT) + 4 (frame buffer) + 1 (output register) + k cycles, i.e. 6 to 9
cycles. After reset, inputs may start once `ready` is high. Frames can follow each other with no idle cycles.

## Top-level interface (`ft_parallel_fft_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `ready` | out | 1 | the FFTs' rotation-factor tables are built; inputs may start |
| `in_valid` | in | 1 | one sample of each of the four streams is present; every four form a frame |
| `x_re[4]`, `x_im[4]` | in | 12 | input samples x1..x4, two's complement |
| `inj_en` | in | 7 | test only: corrupt the current output sample of FFT 1..7 |
| `inj_re`, `inj_im` | in | 16 | test only: XOR pattern for `inj_en` (low 14 bits for FFTs 1–4) |
| `inj_flag` | in | 4 | test only: invert the Parseval flags delivered in this cycle |
| `inj_tmr` | in | 3 | test only: invert all outputs of one corrector copy before the vote |
| `out_valid`, `out_last` | out | 1 | corrected bin present; last bin of the frame |
| `y_re[4]`, `y_im[4]` | out | 14 | corrected outputs |
| `sos_err` | out | 4 | Parseval flags of the frame being output |
| `corrected` | out | 4 | outputs rebuilt in this frame |
| `uncorrectable` | out | 1 | more than two flags: outputs not corrected |
| `syndrome` | out | 3 | C1 C2 C3 of the uncorrected sample |

Tie the `inj_*` inputs to zero in normal use. The parameters are `IN_W` (12),
`ACC_W` (39), `THRESH` (0) and `TMR` (1; 0 builds a single corrector). The
output width is `IN_W + 2`. The end-to-end test covers only the default
parameter values.

## Sizes

| quantity | value |
|----------|-------|
| protected FFTs / redundant FFTs | 4 / 3 |
| FFT size | 4 points |
| original FFT input / output | 12 / 14 bits |
| redundant FFT input / output | 14 / 16 bits |
| Parseval accumulator | 39 bits; the largest sum needs 30 |

The code is the (7,4) Hamming code and is fixed in `ft_pkg`. Protecting more
FFTs needs a longer code: eleven FFTs need four redundant ones. That means
changing the matrix and the counts in the package. It also means changing the
rebuild order in the corrector, because the "visit Z1 first" argument relies on
Z1 being in every check.

## Design choices beyond the basic scheme

* **FFT size set at build time.** The FFT size is chosen when the design is
  built, through a parameter. It cannot be changed at run time. The protected
  array itself is built and tested at 4 points only. At larger sizes the FFTs
  round their results, which has two consequences. The Parseval check would
  need a nonzero `THRESH`. A rebuilt output would also differ from the true
  result by the rounding of the redundant FFT.
* **Complex samples.** Samples are complex. The Parseval check therefore
  squares two parts per sample: two multiplications per input and output
  sample.
* **Arithmetic encoding.** The redundant inputs are arithmetic sums. An XOR
  encoding would not survive the transform, because the DFT is linear only over
  addition.
* **Handshake and reset.** The streams use a valid strobe with no
  back-pressure. All state is reset synchronously.
* **Fault-injection ports.** The `inj_*` inputs exist only for testing. They
  model soft errors at three points: an FFT's output, a Parseval flag, and one
  copy of the corrector.

## Files

| file | contents |
|------|----------|
| `rtl/ft_pkg.sv` | sizes and the parity-check matrix |
| `rtl/fft_core.sv` | streaming radix-2 FFT with on-line rotation factors |
| `rtl/sos_check.sv` | sequential Parseval check |
| `rtl/ecc_encoder.sv` | redundant-FFT input sums |
| `rtl/ecc_corrector.sv` | frame buffer, syndrome, rebuild of flagged outputs |
| `rtl/tmr_corrector.sv` | three correctors and a majority voter |
| `rtl/ft_parallel_fft_top.sv` | the complete protected FFT array |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/fft_core_harness.sv` | stimulus and checker for one FFT size |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/ft_pkg.sv tb/tb_ft_parallel_fft_top.sv --top-module tb_ft_parallel_fft_top
./obj_dir/Vtb_ft_parallel_fft_top
```

Replace the top module name to run another testbench. All of them run in a
few seconds.

The testbenches compare against reference values computed in the testbench
itself: the DFT from its definition, sums of squares, and the code relations
written out by hand.

* `tb_fft_core` builds the core at 4 points and at 16 points. It compares the
  bins with a floating-point DFT: exact at 4 points, within 6 LSB at 16. It
  also checks bin order, `out_last`, exact arrival cycles and `ready`. It uses
  random and full-scale frames, back to back and with gaps.
* `tb_sos_check` uses overlapping frames. Each frame is intact, has an offset
  error, or has a sign flip, which must go undetected. It checks the one-cycle
  result timing.
* `tb_ecc_encoder` covers random and corner values.
* `tb_ecc_corrector` covers all sixteen flag patterns, errors in redundant
  outputs, the syndrome and the 5-cycle latency.
* `tb_tmr_corrector` repeats the corrector test. On a third of the cycles it
  also inverts all outputs of one copy, and the voted outputs must not change.
* `tb_ft_parallel_fft_top` drives the whole array at its default sizes. Its
  first frame uses inputs x1..x4 = 1, 2, 3, 4 with errors in FFTs 3 and 4.
  About 400 random frames follow. The test counts each mechanism and fails if
  one never occurs: clean frames, single and double corrections (every pair),
  uncorrectable frames, errors in redundant FFTs, Parseval-blind errors, false
  flags, upsets of one corrector copy, back-to-back frames and idle gaps. Every output bin is checked for
  value, status and arrival cycle.
