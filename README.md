# Fault-detecting radix-4 SRT complex divider

This RTL divides one complex number by another, (a + jb) / (c + jd), with
8-bit two's complement parts. The divider detects hardware faults while it
runs. Two detection schemes are provided, and both sit side by side in the top:

* **Scheme I** combines parity codes with partial hardware duplication. It checks
  every register, the quotient ROM, the adders and the multiplier as they work.
* **Scheme II** is RESO (recomputing with shifted operands). It divides a second
  time with dividend and divisor doubled, and compares the two quotients.
  Doubling both leaves the quotient unchanged, so no decoding step is needed.

Each quotient part comes out as a 17-bit mantissa plus an exponent. It is
within one unit in the last place of the exact value.

## How a complex division is done

1. **Rationalise the denominator.** The dividend and the divisor are both
   multiplied by the conjugate c − jd. This gives
   n_re = ac + bd, n_im = bc − ad and a real denominator c² + d². The complex
   products use Golub's method, which needs three real multiplications
   instead of four (`golub_cmul`, `cdiv_multiplier`).
2. **Normalise.** n_re, n_im and c² + d² are each shifted until their magnitude
   lies in [1, 2). The difference of the shifts is the exponent of the result
   (`cdiv_normalizer`).
3. **Divide twice in parallel.** Two identical radix-4 SRT lanes run side by
   side. One divides n_re by the denominator and the other divides n_im
   (`srt_lane`). They share one dual-port quotient-selection ROM (`qsel_rom`).

The value of a quotient part is `q * 2^(exp - 14)`. If the divisor is zero,
`den_zero` is set and both quotients are zero.

## The SRT lane

Each lane computes eight radix-4 digits q_j from the set {−2, −1, 0, 1, 2},
using the recurrence

    R[j+1] = 4 * (R[j] - q_j * D),   R[0] = N,   N and D normalised, D in [1, 2)

Eight digits give a 16-bit quotient. The digit set is the minimally redundant
one, with bound h = 2/3. A digit k is acceptable whenever
(k − 2/3)·D ≤ R ≤ (k + 2/3)·D. The overlaps between neighbouring intervals let
the digit be chosen from a rough estimate of R.

**Carry-save remainder.** The partial remainder is held as two vectors, U (sum)
and V (carry), so the update needs no carry propagation. The update works like
this:

* A multiplexer forms 0, ±D or ±2D.
* One row of full adders (`csa_par`) adds it to U and V.
* Both vectors are shifted left by two.

U and V are 19 bits wide: a sign bit, three integer bits and 15 fractional bits.
That is enough for |4R| < 16/3.

**Digit selection.** An adder forms U + V. The result is rounded to a multiple
of 1/4 and addresses the ROM together with the divisor's leading bits
d0.d1d2d3. The ROM needs only the non-negative half of the table. A negative
estimate is negated (two's complement) before the lookup, and the digit read
back is negated the same way (`qsel_fold`). This halves the table to
256 words of 3 bits, plus a parity bit each.

The ROM contents come from a closed formula, with m = |estimate|·4 and
dj = D·8:

    q = 2  if 6m >= 4dj + 7
    q = 1  if 6m >= dj + 4
    q = 0  otherwise

The formula is evaluated when the design is elaborated (`cdiv_pkg::qsel_word`).
The margins cover both errors in the address: up to 1/8 from rounding the
remainder, and up to 1/8 from truncating the divisor. `tb_qsel_rom` proves
this for every word. At D = 9/8 the bound is met exactly.

Three choices were needed to make this table exact:

* The estimate adds the **full width** of U and V, not just a few leading bits.
* The estimate carries **one more integer bit** than a 5-bit rounded value would.
* Magnitudes of 4 and above **saturate to 3.75**. All of those select digit 2,
  so the ROM stays at 256 words.

**Two cycles per iteration.** Each iteration has two halves:

* P1 selects the digit. It reads the register called slot A.
* P2 updates the remainder. It reads slot B, the register that follows P1.

One division therefore takes 16 cycles. Because the two halves use disjoint
registers, a second division can occupy the other slot at the same time.

**Quotient assembly.** Each digit is shifted into one of two registers.
Q_pos receives the positive digits and Q_neg the magnitudes of the negative
ones. The result is Q_pos − Q_neg (`otf_conv`).

## Scheme I: parity and duplication

| Part | Check |
|---|---|
| Multiplier | x_re + x_im + 2·b·d = t1, with b·d from its own multiplier; the imaginary part of c² + d² must be zero |
| U, V, D, digit, Q_pos/Q_neg and result registers | a parity bit written with the data and checked continuously (`parity_reg`) |
| ROM | a parity bit per word, checked at the read port |
| Estimate adder | duplicated in a different form (u − ~v − 1) and compared |
| Carry-save adder | each full adder's sum and carry re-derived and compared |
| Converter subtractor | duplicated and compared |

The flags are reported as `err_flags = {rom, im, re, mul}` and OR-ed into
`err`. A single parity bit cannot see an even number of flipped bits in one
register. Multi-bit LFSR patterns therefore sometimes escape: `tb_cdiv_top`
reports the count.

The carry check uses `cout ^ (a&b) ^ ((a^b)&cin)`, the standard carry identity.
The often-quoted form `(a&b) ^ (a^b)&(cin^cout)` signals an error on a correct
adder when a = b = 1.

## Scheme II: RESO, sub-pipelined

The lanes, D, U and V are one bit wider (20 bits).

* The first run loads N and D unchanged.
* One cycle later, the second run loads 2N and 2D into the slot the first run
  has just left.
* During the second run, the estimate and the divisor bits for the ROM are
  taken one position higher, so both runs see the same ROM addresses and
  should produce identical digits.
* Each run's digits go to its own Q_pos/Q_neg pair.
* The two quotients are stored in Q and Q_RESO (`reso_compare`). A mismatch
  raises the error.

Interleaving the two runs costs only one extra cycle over a single division.

The shift is applied to the normalised operands entering the lanes. Doubling
a, b, c, d before the multiplier would be cancelled by the normaliser.
RESO therefore does not cover the conjugate multiplier. A fault there gives
the same wrong quotient in both runs, and `tb_cdiv_core` excludes that site
from its RESO coverage check.

## Interface and timing (`cdiv_top`)

Both dividers take the same `start`, `a`, `b`, `c`, `d`. Their outputs carry
the suffix `_p` (Scheme I) or `_r` (Scheme II): `busy`, `done`, `q_re`, `q_im`,
`exp_re`, `exp_im`, `den_zero`, `err_flags`, `err`.

* `start` is accepted while `busy` is low.
* The cycle sequence is:
  * operand register: 1 cycle
  * product register: 1 cycle
  * lane load: 1 cycle, plus 1 more for RESO
  * iterations: 16 cycles
  * `done` then pulses with the result valid.
* Measured from the clock edge that samples `start`, `done` is high 19 cycles
  later (20 for Scheme II).
* A new operation can start on the cycle after `done`.
* The error flags are sticky for one operation. They are valid with `done` and
  are cleared by the next `start`.
* Reset is asynchronous, active low.

Parameters: `W` = 8 (operand width), `FRAC` = 15 (fractional bits of the
normalised divisor), `NDIG` = 8 (radix-4 digits), `EW` = 6 (exponent width).
`cdiv_core` has a `SCHEME` parameter (`SCHEME_NONE`, `SCHEME_PARITY`,
`SCHEME_RESO`) if only one divider is wanted.

### Fault injection

Fault injection is for evaluating the detectors; keep `inj_enable` low in normal
use.

* Three maximal-length LFSRs (`fault_lfsr`) supply the fault patterns:
  * a 16-bit one for the registers and the multiplier output
  * a 5-bit one for the adders, applied to the five leading bits of the
    estimate adder or CSA output
  * a 3-bit one for the digit bits of a ROM word
* They fire once every 8, 4 or 2 cycles (`inj_rate` = 0, 1, 2). `inj_load`
  loads `inj_seed` into the 16-bit generator, and seeds folded from it into
  the other two.
* On each firing, the pattern that belongs to the chosen point is XOR-ed,
  for that one cycle, onto that point of one lane of one divider.
  `inj_target` picks the divider, `inj_lane_im` the lane, and `inj_site` the
  point.
* The injection points are U, V, D, the ROM word, the estimate adder, the CSA
  sum, Q_pos, the converter output and the real numerator product.
* With `inj_permanent` high the fault is permanent: the pattern present when
  `start` is taken is applied in every cycle of that division.

Inside `cdiv_core`, the `inj` port (`cdiv_pkg::fault_t`) can hold any mask for
any number of cycles. This allows single-bit, multi-bit and permanent faults.

## Measured fault coverage

`tb_fault_campaign` injects the same faults into a Scheme I and a Scheme II
core. It compares both against an unchecked core that gets the same operands.
A fault counts only when it changed the quotient. Faults with no visible
effect are aliasing and are counted apart. Typical figures:

| Fault class | Scheme I | Scheme II (RESO) |
|---|---|---|
| single bit, every bit of every site, one cycle | all flagged | all changed results flagged, except multiplier faults |
| random 16-bit LFSR patterns at random sites, 1 per 8 cycles | ~91% | ~99% (100% without multiplier faults) |
| same, 1 per 4 and 1 per 2 cycles | 99.7–100% | ~99.9% (100% without multiplier faults) |
| one bit inverted for a whole division | 100% | ~95% |
| two bits of one register, one cycle | 0% | 100% |

These figures show the weak spot of each scheme:

* **Scheme I.** A single parity bit cannot see two flips in the same register,
  and nothing downstream catches the error it leaves behind. The carry-save
  adder and the converter are checked, but they compute correctly from the
  already-wrong remainder.
* **Scheme II.** RESO misses faults in the multiplier, because the
  multiplication is not repeated. A permanent fault inverts one bit in both
  runs. That bit weighs twice as much in the first run as in the shifted one,
  so the two errors differ by about a factor of two. Now and then both still
  round to the same wrong quotient.
* **Scheme II and the ROM.** The shifted run reads its estimate and divisor
  bits one position higher, so both runs address the same ROM words. A
  transient ROM fault hits one run and is caught. A permanent fault in a ROM
  word corrupts both runs alike and goes unseen; Scheme I's ROM parity
  catches it whenever an odd number of bits is wrong. `tb_cdiv_top` runs
  multi-bit permanent faults through the top. Scheme I misses those with an
  even number of flipped bits in a parity-protected register or ROM word.
  Scheme II misses the ROM ones.

## Departures and limits

* **Throughput.** This divider delivers one complex quotient every 20 cycles
  (21 with RESO), about 1.6 result bits per cycle. FPGA throughput figures of
  roughly 4 bits per cycle have been reported for this architecture. This
  design follows the description of two cycles per iteration and eight
  iterations, and does not reach that figure.
* **Widths.** These are wider than a minimal 16-bit datapath:
  * remainder registers: 19 bits (20 with RESO)
  * quotient: 17 bits (16 bits plus a sign)
  * estimate: a full-width adder and a 6-bit rounded value
* **No final correction.** The quotient is not corrected by the sign of the
  last remainder. Errors stay within one unit in the last place, and the
  remainder itself is not output.
* **Faults are bit flips (XOR),** not OR/AND stuck-at overlays. A stuck-at
  fault can still be modelled through `inj` by flipping a bit only while it
  holds the wrong value.
* **Not implemented:**
  * a right-shift RESO variant, which halves the operands instead of doubling
    them
  * a fully duplicated design
  * a multiply-back check of the quotient
* **Precision.** Only the default 16-bit quotient has been
  simulated. Parameters exist for longer quotients (`NDIG`), but those are
  untested.

## Files

`rtl/` holds one module or package per file, with `cdiv_top` as the top. Each
file begins with a description of its block. `tb/` holds one self-checking
testbench per module. Each prints `TB_RESULT checks=N failures=M`.

* `tb_cdiv_top` runs the whole design at its default size:
  * 300 fault-free divisions
  * 540 divisions under LFSR injection
  * 140 divisions under permanent faults
  * it checks that every mechanism (zero divisor, negative digits, each
    injection rate, each detector) occurs at least once.
* `tb_fault_campaign` measures fault coverage (section above).
* `tb_cdiv_core` compares the three schemes against exact arithmetic and
  checks the latency and fault detection of each.

To simulate with Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl --top-module tb_cdiv_top \
        rtl/cdiv_pkg.sv tb/tb_cdiv_top.sv
    ./obj_dir/Vtb_cdiv_top

`-y rtl` lets Verilator find each module in the file of the same name; the
package is named explicitly because it must be read first. Any other
testbench works the same way with its own file and top name.
