# Hybrid floating-point / LNS arithmetic processor

A 32-bit arithmetic coprocessor that runs IEEE-style single-precision floating-point
(FLP) arithmetic and logarithmic-number-system (LNS) arithmetic on **one** datapath.
The main idea is that LNS addition and subtraction, the hard LNS operations, are
rewritten entirely in terms of FLP hardware:

    a (+/-) b  =  d + log2(1 +/- 2^-v),     v = |a - b|,  d = the larger of a, b

The term `2^-v` is produced by an FLP multiply-add unit fed with two table-and-series
factors. The `log2` comes from the same multiplicative-normalisation hardware that does
FLP division. A plain FLP processor with a fused multiply-add and a divider becomes a
hybrid one by adding an "exponential unit" in front of the MAF and a logarithm path
beside the divider.

The RTL follows the architecture of *"Design of a Versatile and Cost-Effective Hybrid
Floating-Point/LNS Arithmetic Processor"*: its seven instructions, three execution
units, state machine and cycle counts. Widths the publication leaves open, the
instruction encoding, the host handshake and special-value handling are choices made
here; they are listed in "Where this design departs or decides" below.

## Number formats

Both kinds of word use the same 32-bit layout, `{sign, 8 bits, 23 bits}`:

| | value |
|---|---|
| FLP | `(-1)^s * 1.m * 2^(e-127)` (IEEE single, no subnormals) |
| LNS | `(-1)^s * 2^(eI.eF - 127)`, with `eI.eF` an unsigned 8.23 fixed-point logarithm |

In both formats, field value 0 means zero, and field value 255 means infinity (fraction 0) or NaN (any other
fraction; the processor produces `0x7FC00000`). Because the layouts match, a
conversion changes only the interpretation of the 31 magnitude bits, and a comparison of
LNS magnitudes is an unsigned comparison of bits 30:0. The type `word_t` in `hyb_pkg`
is this layout.

## Instruction set and host interface

The processor is a stream coprocessor with an FSL-style interface (the usual stream
bus of a soft-core host). The input side has `fsl_s_data`, `fsl_s_exists` and `fsl_s_read`:
a word is taken in a cycle when both `exists` and `read` are high. The output side has
`fsl_m_data`, `fsl_m_write` and `fsl_m_full`: the result is pushed in the cycle in which
`write` is high, and `write` is only raised while `full` is low.

One instruction is one control word followed by its operands:

| opcode (ctrl word bits 2:0) | instruction | operands | result | datapath cycles |
|---|---|---|---|---|
| 0 | FLP-MPY-Add | R1 = A, R2 = B, R3 = C | B*C + A (FLP) | 3 |
| 1 | FLP-MPY-Sub | R1 = A, R2 = B, R3 = C | B*C - A (FLP) | 3 |
| 2 | FLP-DIV | R1 = dividend, R2 = divisor | R1 / R2 (FLP) | 3 |
| 3 | FLP-to-LNS | R1 (FLP) | log form of R1 (LNS) | 3 |
| 4 | LNS-to-FLP | R1 (LNS) | FLP value of R1 | 4 |
| 5 | LNS-Add | R1 = a, R2 = b | a + b (LNS) | 7 |
| 6 | LNS-Sub | R1 = a, R2 = b | a - b (LNS) | 7 |
| 7 | reserved | R1 (ignored) | NaN | 0 |

Latency seen by the host: one cycle per word read, one extra cycle to load the
operand registers, the datapath cycles of the table, and one Write cycle.
Back-to-back instructions are not overlapped. The `busy` output is high whenever
the controller is not idle.

## How LNS add/sub flows through the datapath

This is the part of the design that is not a textbook FLP unit.

1. **Exp state (exponential unit, `exp_unit`).** The unit computes `v = |a - b|` on the
   31-bit magnitudes and selects `d` (the larger operand with its sign). It then rewrites
   `2^-v = 2^(v'-127)` with `v' = 127 - v`. Let `v'` have integer part `v'_I` and fraction `0.f1 f2`,
   where `f1` is the top 8 fraction bits and `f2` the low 15. Then
   `2^-v = 2^(v'_I-127) * 2^(0.f1) * 2^(0.f2 * 2^-8)`, and the unit produces two FLP operands:
   * `B = (+/-) 2^(v'_I - 127) * 2^(0.f1)`, from a 256-entry table `round(2^(i/256) * 2^47)`.
     The sign is minus for an effective subtraction.
   * `C = 2^(0.f2 * 2^-8) = e^(w * 2^-8)` with `w = 0.f2 * ln 2` (a constant multiplier),
     from the Taylor series `1 + w 2^-8 + w^2/2 2^-16 + w^3/6 2^-24 + w^4/24 2^-32`.
     The square term is computed exactly. For the cubic and quartic terms `w` is split as
     `w21 + w22 2^-8` (8 and 15 bits). A 256-entry table computed at elaboration holds
     `w21^3/6 + w21^4/24`, and a small multiplier adds the correction `(1/2) w21^2 w22 2^-32`.

   `B` and `C` are both 1.47 fixed-point mantissas, because subtraction with `v`
   near zero cancels almost everything. The top 24 bits go into the FLP operand words and
   the low 24 bits (`mbp2`, `mcp2`) travel beside them.
2. **MAF1-MAF3 (`flp_maf`).** With `A = 1.0` the MAF computes `X = B*C + 1`. Two extra
   24x24 multipliers add the cross terms `m_B * mCp2` and `m_C * mBp2`, so the product is
   `m_B m_C` with 70 fraction bits. The addend is placed 27 binades above the product in a
   100-bit field (28 integer bits, 70 fraction bits, carry and sticky), aligned by a right
   shift only. The sum is normalised with a leading-zero count and rounded to nearest even.
   `X` lies in `[0, 2]` and is an ordinary FLP number.
3. **DIV1-DIV3 (`div_log_unit`).** The unit returns `z = d + E_X - 127 + log2(1.m_X)` (see below),
   rounded to 23 fraction bits, with the sign of `d`. `X = 0` (exact cancellation)
   gives LNS zero.

LNS-to-FLP is steps 1 and 2 only: `B = 2^(a_I - 127) * 2^(0.f1)`, `C = 2^(0.f2 2^-8)`,
`A = 0`. FLP-to-LNS is step 3 only, with `d = 0` and without the `-127`.

## The division and logarithm unit

Both division and log2 are done by multiplicative normalisation. The divisor mantissa
`X` is driven to 1 by three factors, and the same factors multiply the dividend:

* stage 1: `k/256` from a reciprocal table on the top 8 fraction bits,
  `k = floor(65536 / (257 + i))`, so that `X1 = X k/256` is at most 1;
* stage 2: `1 + S2 2^-15`, with `S2` = bits 7..15 of `1 - X1`;
* stage 3: `1 + S3 2^-28`, with `S3` = bits 1..28 of `1 - X2`.

The dividend times the three factors is the quotient, which is normalised and rounded.
For the logarithm, `-log2` of each factor is accumulated in 40 fraction bits:
* `rtl/log1_tab.hex` holds `round(-log2(k_i/256) * 2^40)`;
* `rtl/log2_tab.hex` holds `round(log2(1 + j 2^-15) * 2^40)` for `j` = 0..511;
* the third term is `S3 2^-28 / ln 2`, because `log2(1+e) ~ e/ln 2` for `e < 2^-13`.

## Controller

`control_unit` is an FSM with the states Idle, Read, Exp, MAF1, MAF2, MAF3,
DIV1, DIV2, DIV3 and Write, and one `<state>_st` strobe per state (`ctrl_t` in `hyb_pkg`).

* **Read.** The state pops the control word into the control-word register, then the operands into
  R1..R3. A counter holds the number of words still to come (3 for MAF, 2 for DIV and
  LNS add/sub, 1 for the conversions). Read lasts one cycle past the last pop, so that the
  A/B/C registers (loaded in Read and Exp) see the final R registers.
* **Dispatch.**
  * LNS-Add, LNS-Sub and LNS-to-FLP go to Exp.
  * FLP MAF goes to MAF1.
  * FLP-DIV and FLP-to-LNS go to DIV1.
  * After MAF3, LNS add/sub continue to DIV1; everything else goes to Write.
* **Write.** The result is pushed when the output stream has room; the FSM then returns to Idle.

`hybrid_datapath` holds the registers and the operand multiplexers:
* **A:** R1, or 1.0 for LNS add/sub, or 0.0 for LNS-to-FLP.
* **B, C:** R2 and R3, or the exponential-unit outputs.
* **Dividend:** R1 for FLP-DIV, otherwise 1.0.
* **Divisor:** R1 for FLP-to-LNS, R2 for FLP-DIV, or the MAF result for LNS add/sub.
* **Output:** MAF result or division/log result.

## Accuracy

The figures below are for random and swept operands, against double-precision references:

| instruction | worst error seen | bound checked |
|---|---|---|
| FLP-MPY-Add/Sub | 0.50 ULP (correctly rounded) | 0.5 ULP |
| FLP-DIV | 0.62 ULP | 1 ULP |
| FLP-to-LNS | 0.57 LSB of the 23-bit log | 1 LSB |
| LNS-to-FLP | 0.50 ULP | 0.5 ULP |
| LNS-Add/Sub | 1.15 LSB of the 23-bit log (`v >= 2^-20`) | 1.44 LSB |

An error of 1.44 LSB in the logarithm is a relative error of `1.44 * ln 2 * 2^-23 = 2^-23`
in the value, so every instruction stays within a relative error of `2^-23`, apart from the
near-cancellation case below. LNS add/sub
cannot reach 0.5 LSB for two reasons. The intermediate `X = 1 +/- 2^-v` is rounded to an
FLP single, which alone costs up to `1.443 * 2^-24` in the logarithm. Then `z` is rounded
once more.

Known limits:

* **Series truncation.** The series for `C` leaves out two small pieces. One is the
  `w21 * w22^2` part of the cubic term, up to about `2^-41.5` in `C`. The other is the
  `mBp2 * mCp2` product in the MAF, up to `2^-46`. Both errors are absolute, so they only
  matter in LNS subtraction of nearly equal numbers, where `X = 1 - 2^-v` is tiny.
  Measured worst case, in LSBs of the 23-bit logarithm:

  | `v` | up to `2^-20` | `2^-21` | `2^-22` | `2^-23` |
  |---|---|---|---|---|
  | error | 1.2 | 2.8 | 5.8 | 12 |

  Exact equality (`v = 0`) still gives zero.
* **Division rounding.** The quotient is accurate to about `2^-26` before rounding. It is within one ULP of the
  exact quotient, but not always the correctly rounded one.
* **Flushing.** FLP subnormal inputs are treated as zero, and underflowing results flush to zero. No
  exception flags are produced.

## Where this design departs or decides

* **Mantissa adder width.** The original architecture gives the MAF's mantissa adder
  both as 98 bits (28 integer and 70 fraction bits) and as 74 bits. The 98-bit form is used here, since the extended product
  has 70 fraction bits.
* **S2 width.** The original architecture gives stage two of the division unit an 8-bit `S2` (bits 8..15) and a
  256-entry table. With the truncating reciprocal table used here, `1 - X1` reaches 0.0092 (>
  `2^-7`), so `S2` is 9 bits and the second log table has 512 entries. A reciprocal
  table with different contents could restore the 8-bit form. `S3` likewise uses every
  bit of `1 - X2` down to `2^-28`.
* **Choices made here:**
  * the opcode encoding;
  * the operand order and the meaning of MAF-Sub (`B*C - A`);
  * the stream handshake;
  * special values;
  * the reciprocal table contents;
  * all internal fixed-point widths;
  * registering `mbp2`/`mcp2` alongside B and C;
  * gating `d` to zero outside LNS add/sub.
* **Not built:**
  * the host processor and its stream links: the ports are brought out instead;
  * LNS multiply/divide, which is only a fixed-point add/subtract of the logarithms and
    is not part of the seven-instruction controller.

## Files

| file | contents |
|---|---|
| `rtl/hyb_pkg.sv` | word layout, opcodes, state strobes, constants, helper functions |
| `rtl/hybrid_processor.sv` | top: controller plus datapath, stream ports |
| `rtl/control_unit.sv` | FSM, read counter, stream handshake |
| `rtl/hybrid_datapath.sv` | registers, operand and result multiplexers, the three units |
| `rtl/exp_unit.sv` | B/C/d operand generator for LNS-to-FLP and LNS add/sub |
| `rtl/flp_maf.sv` | three-stage extended-precision multiply-add |
| `rtl/div_log_unit.sv` | three-stage division and logarithm |
| `rtl/hex_rom.sv` | asynchronous ROM initialised from a hex image |
| `rtl/exp2_tab.hex` | 256 x 48 bit: `round(2^(i/256) * 2^47)` |
| `rtl/log1_tab.hex` | 256 x 41 bit: `round(-log2(floor(65536/(257+i))/256) * 2^40)` |
| `rtl/log2_tab.hex` | 512 x 40 bit: `round(log2(1 + j 2^-15) * 2^40)` |

The tables are read with `$readmemh` by paths relative to the repository root. Run the
simulator from there.

## Simulation

Each testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`:

| testbench | what it covers |
|---|---|
| `tb_flp_maf` | MAF against exact products and sums, extended-precision operands, specials, latency |
| `tb_exp_unit` | B*C and d against `2^x` and `1 +/- 2^-v` in double precision |
| `tb_div_log_unit` | quotient, log2, `d + log2 X`, specials, three-stage latency |
| `tb_control_unit` | strobe order, datapath cycle counts, stalls on both streams |
| `tb_hybrid_datapath` | datapath driven by a modelled controller, all instructions |
| `tb_hybrid_processor` | end to end through the stream ports; random input gaps and output back-pressure; cycle counts; every mechanism counted |
| `tb_three_phase` | specials for all instructions, sweep of every exponent or integer part, sweep of the leading 11 fraction bits |

`tb_util_pkg.sv` holds the double-precision reference arithmetic. Example:

    verilator --binary --timing --assert --top-module tb_hybrid_processor \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/hyb_pkg.sv tb/tb_util_pkg.sv tb/tb_hybrid_processor.sv
    ./obj_dir/Vtb_hybrid_processor

All testbenches finish in well under a second of wall-clock time at the default (and only)
word width of 32 bits. The three-phase test is far smaller than an exhaustive
hardware evaluation: it has about 2,500 cases per instruction, not millions.
