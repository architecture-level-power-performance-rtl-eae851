# A floating-point adder pipelined for the fewest register bits

Pipeline registers cost power on every clock edge. How much depends on where
the pipeline is cut: at one boundary 78 bits may be alive, at another 178. This
design is a pipelined IEEE 754 single-precision adder whose registers are not
placed by hand. They come from a small algorithm that runs at elaboration. The
datapath is first cut into ten fine-grained candidate stages. For a target
clock period, the algorithm then removes every boundary it can drop without
breaking timing, preferring to keep the narrow cuts and to drop the wide ones.
At a 2500 ps target it keeps 7 of the 10 boundaries, and the pipeline register
count falls from 1213 to 841 bits (counted with the reference implementation's
boundary sizes). Timing still holds.

Everything is plain synthesizable SystemVerilog. The register placement is a
parameter, so the same source also gives the fully registered ("naive") pipeline
or any placement you choose.

## The datapath: a two-path adder in ten stages

The adder uses the classic two-path organisation:

* **Close path.** This path handles effective subtractions where the exponents
  differ by 0 or 1. These are the only cases with massive cancellation. Both
  differences are formed, the non-negative one is kept, and it is normalised by
  a leading-zero count and a left barrel shift. It needs no right alignment.
* **Far path.** This path handles everything else. The smaller operand is
  aligned by a right barrel shift that collects a sticky bit. It is added or
  subtracted, and then needs at most a one-bit shift right (carry out) or left
  (lost leading one).
* **Bypass.** NaN and infinite operands skip the arithmetic.
* **Result integrator.** This picks one of the three results, rounds to
  infinity on overflow, and sets the flags.

The datapath is made of 21 functional elements, grouped into ten stages. Each
stage is one combinational module. The delay and the width of the cut below
each stage come from a reference 90 nm implementation. These are the only
numbers the placement algorithm uses:

| Stage | Module | Elements | Critical delay (ps) | Bits at the cut (reference) | Bits at the cut (this RTL) |
|---|---|---|---|---|---|
| 0 | input register | operands | – | – | 64 |
| 1 | `fpa_s1_denormal` | denormal check | 900 | 78 | 72 |
| 2 | `fpa_s2_expsub` | exponent subtractor | 1300 | 82 | 81 |
| 3 | `fpa_s3_control` | control logic (order, path choice) | 1200 | 109 | 75 |
| 4 | `fpa_s4_align` | data select; barrel right; sticky bit | 1500 | 157 | 123 |
| 5 | `fpa_s5_presum` | close-path subtractor; final sign; far pre-adder | 1400 | 178 | 126 |
| 6 | `fpa_s6_sum` | exponent update; result select; LZ counter; bypass; far adder | 1400 | 146 | 122 |
| 7 | `fpa_s7_prenorm` | pre-barrel-left; carry/lost-one detect | 1100 | 131 | 122 |
| 8 | `fpa_s8_norm` | barrel left; far exponent adjust | 1100 | 114 | 126 |
| 9 | `fpa_s9_range` | overflow detect | 700 | 106 | 127 |
| 10 | `fpa_s10_round` | final 1-bit shift; rounding | 1000 | 112 | 119 |
| out | `fpa_s11_integrate` | result integration, flags | 900 | – | – |

A struct in `fpa_pkg` (`s1_t` … `s10_t`) carries what is alive at each cut.
The RTL's cut widths differ from the reference counts because its internal
encodings differ. The algorithm still uses the reference counts, so it places
registers as in the reference design, not as an optimum for this RTL's own
widths.

## Choosing the registers

`psa_pkg::psa_keep(C, PHI)` returns an 11-bit `KEEP` vector. Bit 0 is the input
register, which always exists. Bit *i* is the register below stage *i*. The
algorithm walks the boundaries from the top down. For each boundary *i* it
computes three flags:

* **I** (timing). Add up the delay that has built up in front of stage *i*
  from stages whose lower boundary was already removed. Add the delay of
  stage *i* and of stage *i+1*. If the total is above `C`, then removing
  boundary *i* would create a stage that is too long, so I = 1.
* **W** (width). W = 1 if `O[i+1] / O[i] > PHI`, that is, if the next cut is
  wider than this one by more than a factor `PHI`. Keeping this narrower cut is
  then the cheaper choice.
* **P** (remove). P = (1 − I)·(1 − W). The register is removed only when both
  timing and width allow it.

The accumulated delay is Σₖ T[k]·Πₘ P[m] over the run of removed boundaries
just above *i*. Boundary 10 is judged against the result integrator: its delay
is 900 ps and it has no outputs to register. Set `PHI` larger than 1 to remove
registers more eagerly. Values above the widest cut divided by the narrowest
(`psa_pkg::phi_max()`, 178 / 78 = 2.28) change nothing more, so a sweep of
`PHI` from 1 to that bound covers every outcome. At 5000 ps, for example, `PHI = 1.4` keeps only boundaries 3 and
6 (255 reference bits, a three-stage pipeline with 15 ns latency at 200 MHz),
against six boundaries and 646 bits with `PHI = 1`.

Results with `PHI = 1` (checked by `tb_psa_pkg`):

| Target period (ps) | KEEP (bit 10 … 0) | Boundaries kept | Reference bits | Longest merged stage (ps) |
|---|---|---|---|---|
| 1500, 1700 | `11111111111` | 10 | 1213 | 1500 |
| 1900, 2100 | `01011111111` | 8 | 987 | 1900 |
| 2300 | `01101111111` | 8 | 970 | 2200 |
| **2500 (default)** | `01010111111` | 7 | 841 | 2500 |
| 3000 – 3600 | `01001011111` | 6 | 678 | 2900 |
| 4000, 4400 | `01010011111` | 6 | 663 | 3900 |
| 5000 | `01100011111` | 6 | 646 | 5000 |

These stage counts agree with the published evaluation of this method for
1500–4400 ps. At 5000 ps the published count is 5, and this implementation
gives 6. The published register counts are about 100 bits higher than the
column above throughout. Most likely they also count registers at the input or
output.

## Interface and timing

`fpa_psa_adder` has these ports:

* `clk`
* `rst_n`: synchronous, active low, clears only the valid bits
* `in_valid`, `a`, `b`
* `out_valid`, `result`, `flags`. `flags_t` is `{invalid, overflow, underflow, inexact}`.

One addition can start every cycle. Nothing ever stalls. A result appears
`psa_pkg::stage_count(KEEP)` cycles after its operands were clocked in. That is
8 cycles by default, and 11 for the naive pipeline. The integrator after the
last kept register is combinational, so `result` is not registered.

Each candidate boundary is an `fpa_stage_reg`. With `KEEP = 1` it is a
register; with `KEEP = 0` it is a wire. The data registers load only when the
valid bit is set, so idle cycles do not toggle them.

Parameters of `fpa_psa_adder`:

| Parameter | Default | Meaning |
|---|---|---|
| `CLOCK_PERIOD_PS` | 2500 | target clock period fed to the algorithm |
| `PHI` | 1.0 | width threshold of the algorithm |
| `KEEP` | `psa_keep(CLOCK_PERIOD_PS, PHI)` | override for a hand-made placement; `'1` is the naive pipeline |

Note that `CLOCK_PERIOD_PS` does not make the RTL meet that period. It only
places registers using the reference delays. On another technology the delays
in `psa_pkg::T_PS` should be replaced by your own synthesis results, and the
counts in `OUTPUTS` by the widths you want to minimise. The struct widths
above are a reasonable choice.

## Arithmetic details

* **Format.** IEEE 754 binary32. Denormal operands and results are fully
  supported: the denormal check gives them the effective exponent 1 with a
  hidden bit of 0.
* **Rounding.** Round to nearest, ties to even. Both paths produce a 24-bit
  significand plus guard (and sticky on the far path). The round-up bit is
  added to the packed `{exponent, fraction}` word, so a carry turns a denormal
  into a normal, or the largest finite number into infinity.
* **Far-path sticky trick.** The aligned operand keeps its sticky bit as the
  least significant bit. A subtraction then yields the correct round and
  sticky bits even after the one-bit left shift.
* **Special values.** Any NaN operand, or inf − inf, gives the quiet NaN
  `0x7FC00000`. Infinities pass through with their sign. x + (−x) gives +0, and
  (−0) + (−0) gives −0.
* **Flags.**
  * `invalid`: a signalling NaN operand, or inf − inf.
  * `overflow`: a finite sum rounded to infinity. `inexact` is also set.
  * `inexact`: the result is not exact.
  * `underflow`: the result is inexact and its exponent field is 0 (tininess
    after rounding).

## What is interpretation

The element names, the ten-stage split and the delay and width tables come
from the reference design. The following are this implementation's own
choices:

* The number format, the rounding mode and the flag set.
* The valid/reset handshake, and whether the output is registered.
* The internal bit widths.
* The exact data flow between elements. The reference gives the elements only
  by name and stage, not their logic.
* The far-path element called "MO/M-1 generator". It is read here as detecting
  the two far-path normalisation cases: carry out ("MSB overflow") and lost
  leading one ("MSB minus one").
* The far-path exponent subtractor is used for the far-path exponent
  adjustment.
* Rounding for both paths is done in stage 10.
* Stage 11 of the algorithm uses the result integrator's delay with zero
  outputs. This is inferred from how the published stage counts come out.

## Verification

Every module has a self-checking testbench in `tb/`:

* **`tb_fpa_s1_denormal` … `tb_fpa_s11_integrate`.** Each drives random and
  special operand pairs through `fpa_comb_chain`, all stages wired without
  registers. It checks the outputs of its own stage against values worked out
  from that stage's inputs: integer differences, shifts with a 128-bit
  reference, a separately written leading-zero count, and normalisation
  properties. The last two stages are checked against the reference adder.
* **`fpa_ref_pkg`.** This is the reference adder. It converts both operands
  exactly to double precision and adds them. The sum is correctly rounded to
  binary32 even though it is rounded twice, because double has more than twice
  binary32's precision. It then rounds to binary32 from the double's bit
  pattern, and recovers the lost low part with a two-sum for the inexact flag.
* **`tb_fpa_stage_reg`.** Checks a kept boundary (delay, reset, hold when idle)
  and a removed one (pass-through).
* **`tb_psa_pkg`.** Checks the algorithm against the published stage counts and
  the timing of every merged stage.
* **`tb_fpa_psa_adder`.** The end-to-end test. It runs the default, the naive,
  the 5000 ps and the 5000 ps `PHI = 1.4` configurations side by side on
  20 000 cycles of mixed traffic, with a reset in the middle. It checks every result, every flag and the latency of
  each. It also counts that each mechanism was exercised: close path, far path,
  bypass, carry-out and lost-one normalisation, denormal results, rounding,
  overflow, idle cycles, reset flush, and a removed boundary.
* **`tb_fpa_sweep`.** Simulates one adder per clock period of the sweep in
  the table above (1500–5000 ps). It checks every result and each latency.
* **`tb_fpa_full`.** Runs 50 000 cycles through the adder with all default
  parameters.

To run one with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/fpa_pkg.sv rtl/psa_pkg.sv tb/fpa_ref_pkg.sv tb/tb_fpa_psa_adder.sv \
      --top-module tb_fpa_psa_adder -o sim
    ./obj_dir/sim

Each testbench prints `TB_RESULT checks=N failures=M`.

## Not included

Power, area and the clock period actually reached depend on a technology
library and a power tool. Nothing here measures or predicts them. The
exhaustive-search placement the algorithm was compared against is not
included. Neither is the hand-made five-stage baseline it was compared with.
That baseline's cuts do not line up with the ten candidate boundaries, but any
placement on those boundaries can be tried through `KEEP`.
