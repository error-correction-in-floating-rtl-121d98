# Residue-code error correction for a redundant decimal/binary significand adder

A floating-point adder that handles both decimal64 and binary64 operands can do
its significand addition in one carry-free signed-digit adder: decimal numbers
use base-10 digits, binary numbers are regrouped into base-8 (octal) digits, and
every digit lies in the set {-6 … 6}. This RTL protects that adder with a
residue code that **corrects** errors, not only detects them. The significand is
cut into 4-digit groups. For every group, the residues of the two operands are
computed modulo two coprime moduli and added in parallel with the main adder.
The residues of the result are then compared with them. The pair of differences
(the *syndrome*) identifies the arithmetic error in that group exactly, and the
error is subtracted from the result.

| radix | base b | moduli | product M | errors covered per group |
|---|---|---|---|---|
| decimal | 10 | 101 = b²+1, 999 = b³−1 | 100899 | −13332 … 13332 |
| octal (binary data) | 8 | 65 = b²+1, 511 = b³−1 | 33215 | −7020 … 7020 |

A 4-digit group whose digits can each be off by up to ±12 has an error of at
most ±12·(b³+b²+b+1): ±13332 in decimal, ±7020 in octal. Both ranges fit inside
the M values of the product of the two moduli, so every error in every digit of
the group is corrected. The moduli were chosen because reducing by them needs
nothing but the same redundant adder cells: b² ≡ −1 (mod b²+1) and
b³ ≡ 1 (mod b³−1).

The design is the significand datapath only. Exponent handling, alignment
shifting, normalisation and rounding of the full floating-point adder are not
part of this RTL.

## Number representation

* **Digit:** a `digit_t` (`logic signed [3:0]`) in two's complement, value in [−6, 6].
* **Transfer digit** (the carry-free adder's "carry", −1/0/+1): a `td_t` is two
  wires `{tpos, tneg}` with value `tpos − tneg`. Helper functions are in
  `rd_pkg`.
* **Radix:** `radix = 1` selects decimal (base 10), `radix = 0` selects octal (base 8).
* Vectors of digits are packed arrays `logic [N-1:0][3:0]`, digit 0 least significant.

The value of a number is Σ dᵢ·bⁱ. A value has many representations, so none of
the blocks below may compare digit patterns. Everything is checked by value.

## The adder cell and the carry-free adder (`mixed_adder_cell`, `rd_adder`)

A cell adds (or subtracts, `sub = 1`) two digits into an *interim* sum w. It
emits an output transfer digit of +1 if w ≥ 6, −1 if w ≤ −6, and 0 otherwise.
The sum digit is w − OTD·b + ITD, where ITD is the transfer digit coming from
the cell below. Because a transfer digit depends only on its own cell's
operands, an N-digit adder is just a row of N cells with no carry chain.
`rd_adder` (default N = 20) exposes every position's transfer digit on `td_out`
so that the checker can see the transfer digits at group boundaries.

The cell also gives correct results when |a| + |b| ≤ 13. This lets the residue
generators feed it digits of magnitude 7.

## Residue generators — the core of the checker

Both generators take a 4-digit redundant number and produce a residue in
[0, m−1], itself written in redundant digits. They are built only from
adder cells and a 2-way selection. Each computes an *uncorrected* value and, in
parallel, a *corrected* value (the uncorrected one plus the modulus), and the
sign of the uncorrected value selects the result. Negative digits make
intermediate values negative, and a single addition of m is always enough
because of the value ranges below.

### Modulo 101 / 65 (`resgen_m101`)

Since b² ≡ −1, X = x₃x₂x₁x₀ ≡ x₁x₀ − x₃x₂. Two cells subtract the upper digit
pair from the lower pair. The trick that keeps this to one cell level: the
upper cell's output transfer digit has weight b², which is −1 modulo m. So it
is fed back, negated, as the input transfer digit of the lower cell. This is not
a combinational loop, since a cell's transfer digit depends only on its
operands. The result r₁r₀ lies in [−66, 66] (decimal) or [−54, 54] (octal).

A second pair of cells computes the same subtraction with x₂ replaced by
x₂ − 1, giving r + b + 1 in two digits. If r < 0, the output is (1, rc₁, rc₀),
which is r + b² + 1 = r + m. Otherwise it is (0, r₁, r₀). The sign of r is
that of r₁, or of r₀ when r₁ is zero.

**Correction inputs.** The syndrome generators need (X + otd_in + otd2_in − itd_in)
mod m. A *number preparation* step adds these three transfer digits to x₀. If
the new digit leaves [−4, 4], one unit of b is moved into x₁, which may then
reach ±7. That is the case the widened cell covers.

### Modulo 999 / 511 (`resgen_m999`)

Since b³ ≡ 1, X ≡ x₂x₁x₀ + x₃. One 3-digit adder adds LS = x₂x₁x₀ and
MS = (0, otd_in + otd2_in, x₃). Its output transfer digit OTD₂ becomes the
fourth digit of the result. The corrected branch adds 999 = 1000 − 1 by
replacing x₀ with x₀ − 1 and making the fourth digit OTD₂ + 1. In this
generator the OTD corrections have weight b (since b⁴ ≡ b mod b³−1), which is
why they sit in digit 1 of MS. The ITD correction enters as the adder's
negated input transfer digit.

## Residue adders (`residue_adder`)

These add or subtract the operand residues with a plain 3-digit (mod 101/65) or
4-digit (mod 999/511) redundant adder. They do no reduction. The unreduced sum
Z goes straight into the syndrome generator, which reduces anyway.

## Syndrome generation: where the transfer digits come in (`syngen_m101`, `syngen_m999`)

A 4-digit group of the main adder really computes
X ± Y + ITD = OTD·b⁴ + result, where ITD and OTD are the transfer digits
entering and leaving the group. So the error in the group is

    error ≡ result + OTD·b⁴ − ITD − Z   (mod m)

with b⁴ ≡ 1 for m = b²+1 and b⁴ ≡ b for m = b³−1.

* **mod 101/65:** a 4-digit subtracter forms result − Z, taking the group's OTD
  as its input transfer digit. The subtracter's own OTD (weight b⁴ ≡ 1) becomes
  the residue generator's `otd_in`, and the group's ITD becomes its `itd_in`.
* **mod 999/511:** result − Z is formed with input transfer digit 0. The group's
  OTD and the subtracter's OTD (both of weight b) go into the residue
  generator's two OTD inputs. The group's ITD goes into its `itd_in`.

A fault-free group gives syndrome (0, 0). `checker_stage2` raises the group's
error flag when either syndrome is non-zero.

## Syndrome decoding (`syndrome_decoder`)

The two residues (S₉₉₉, S₁₀₁) are turned back into a signed number by the
matrix residue-to-weighted conversion with m₁ = 999/511 and m₂ = 101/65:

    p1 = S999
    t1 = (S101 − p1) mod m2                        (4-digit subtracter + mod-m2 residue generator)
    p2 = m1 · ((m1⁻¹ mod m2) · t1 mod m2)          (look-up table indexed by t1)
    E  = p1 + p2                                   in [0, M−1]

with m₁⁻¹ mod m₂ = 55 (decimal) or 36 (octal). The two tables, with 101 and 65
entries of six digits each, are computed at elaboration time from this
formula. They are indexed by the binary value of t₁. Values of E above half
the range stand for negative errors. A parallel adder forms E − M from a
pre-negated p₁ (p₁ − M as six digits), and a range check selects
E − M when E > 50449 (decimal) or E > 16607 (octal). The error output has six
digits: an octal error near ±7020 needs a sixth octal digit.

Worked decimal case: syndromes (582, 88) give t₁ = 11, p₂ = 999·(55·11 mod 101)
= 99900, E = 100482 > 50449, and error = 100482 − 100899 = −417.

## Result correction (`error_corrector`)

Group g's error has weight b^(4g) and covers digits 4g … 4g+5. The errors of
the even groups do not overlap each other, and neither do those of the odd
groups. So they are laid into two (4G+2)-digit vectors A and B without any
addition. The main adder's result, with its final OTD as digit 4G, is widened
to 4G+2 digits, and two chained redundant subtracters form result − A − B. The
output is a (4G+2)-digit number equal to the fault-free result plus
OTD·b^(4G).

## Second correction method: decoding the sum's residues (`result_decoder`)

The value of a group, Vg = Xg ± Yg, lies in the same range as a group error,
because both are sums of two 4-digit numbers whose digits are in [−6, 6]. So
the syndrome decoder can decode the residue pair of the group sum into the
sum itself, exactly as it decodes a syndrome into an error. `result_decoder`
takes the first-stage residue sums Z₁₀₁ and Z₉₉₉ of every group. It reduces
each with a residue generator (all correction inputs zero) and decodes it into
Vg. Then it assembles Σ Vg·b^(4g) + ITD with the same even/odd packing as the
error corrector and one (4G+2)-digit adder. No transfer digit of the main adder
is used, so this answer is independent of the main adder and of the
group-boundary transfer digits. The top brings out both answers: `corrected`
(result minus decoded errors) and `decoded`.

## The top: `ft_sig_adder` and its schedule

`ft_sig_adder` (parameter `G = 5` groups, 20 digits) ties everything together:

* one 20-digit main `rd_adder`, whose result digits pass through a
  **fault-injection** point (`flt_en[i]` replaces digit i with `flt_digit[i]`);
* **two shared first-stage units** (`checker_stage1`: four residue generators
  and two residue adders). Unit A handles groups 0, 1, 2 and unit B handles
  groups 3, 4, one group per clock. The first stage needs only the operands, so
  in a real pipeline it overlaps with the main adder;
* **five second stages** (`checker_stage2`: syndromes, detection, decoding), one
  per group, working in parallel;
* the `error_corrector` and the `result_decoder`, giving the two corrected
  outputs `corrected` and `decoded`.

Timing, for one operation at a time (`in_ready` is high only when idle):

| clock edge | what happens |
|---|---|
| 0 | `in_valid && in_ready`: operands, mode and fault pattern registered; from here on the main adder's `sum`/`sum_otd` are valid (`sum_valid`) |
| 1 | first-stage results for groups 0 (unit A) and 3 (unit B) registered |
| 2 | groups 1 and 4 registered |
| 3 | group 2 registered |
| 4 | per-group `stall` flags and `err_detected` registered (second stages work between edges 3 and 4) |
| 5 | `corrected` and `decoded` registered, `out_valid` high for the following cycle; back to idle |

`stall` and `err_detected` keep their values until the next operation is
accepted. `rst_n` is an asynchronous active-low reset. An assertion checks
that `out_valid` is never raised while idle.

## Design choices and departures from the original scheme

* **Transfer digits are trusted.** Faults are modelled in the result digits
  only. An error in a transfer digit that crosses a group boundary is not
  checked. In the original scheme, such an error would make the next group
  need correction too.
* **Second OTD input** on both residue generators. It carries the transfer
  digit of the result − Z subtraction. The original scheme says such a second
  correction may be needed but does not show where it enters.
* **The mod 999/511 syndrome generator** puts the group OTD into the residue
  generator, at digit 1 of MS, with weight b. This follows the written
  derivation of the original scheme. One of its block drawings instead shows
  the OTD entering the subtracter's transfer input, which would give it weight 1.
* **The number-preparation rule** in `resgen_m101` (folding the corrections
  into x₀ and x₁) is this design's own.
* **The decoder** uses a 6-digit p₁ − M and a 6-digit error instead of 5
  digits. Its tables are indexed by the binary value of t₁. The octal table
  has 65 entries.
* **Result correction** uses its own subtracters and 22 output digits. In the
  original scheme, the total error is sent back through the main adder.
* The clocking, registers, handshake, latency and fault-injection port of the
  top are this design's own. The original scheme gives the sharing (two
  first-stage units, five second stages) and the per-group stall, but no clock
  schedule.
* **Direct decoding** uses its own residue generators and decoders per group,
  not a multiplexer in front of the second stage's decoder. Both correction
  methods run on every operation.
* Not built: the rest of the floating-point adder.
* The significand adder of a combined decimal64/binary64 unit needs 17 decimal
  or 20 redundant octal digits (19 after guard, round and sticky). The default
  of 20 digits covers every case.

## Verification and how far to trust it

Every module has a self-checking testbench in `tb/` that compares against an
integer model (`tb_util_pkg`: digit values, a reference carry-free adder,
random redundant representations). All results are compared by value.

| testbench | what is checked |
|---|---|
| `tb_mixed_adder_cell` | every operand pair, transfer digit, operation and radix |
| `tb_rd_adder` | random 20-digit additions/subtractions, value and digit range |
| `tb_resgen_m101`, `tb_resgen_m999` | every 4-digit input (28561) in both radices with random correction inputs, plus hand-worked cases |
| `tb_residue_adder` | random residue sums, both widths |
| `tb_syngen_m101`, `tb_syngen_m999` | random groups with injected errors; syndrome = error mod m |
| `tb_syndrome_decoder` | every error in ±13332 (decimal) and ±7020 (octal) from random syndrome representations |
| `tb_checker_stage1` | first stage against integer residues |
| `tb_checker_stage2` | the complete 4-digit checker on 17,006,112 random vectors (about one minute), each with a random subset of its result digits replaced |
| `tb_error_corrector` | random results and group errors |
| `tb_result_decoder` | random 20-digit operands (including all-±6 extremes) given as residue sums; decoded value = X ± Y + ITD |
| `tb_ft_sig_adder` | 4000 operations at the default size, with the cycle timing and both corrected outputs. It counts the modes and the stall, unit A/B error, multi-group and sign cases, and fails if any never occurred |

Each testbench was also run against a deliberately broken copy of its module
and reported failures. Verilator lint and a second SystemVerilog front end
(slang, through yosys) accept all RTL, and yosys synthesises it without latches.
No gate-level timing or area results are claimed.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with `$finish`.
It has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/rd_pkg.sv tb/tb_util_pkg.sv tb/tb_ft_sig_adder.sv --top-module tb_ft_sig_adder
    ./obj_dir/Vtb_ft_sig_adder

Replace `tb_ft_sig_adder` by any other testbench name. Modules are found
through `-Irtl`.

## Files

* `rtl/rd_pkg.sv`: digit and transfer-digit types, moduli, helper functions
* `rtl/mixed_adder_cell.sv`, `rtl/rd_adder.sv`: the carry-free adder
* `rtl/resgen_m101.sv`, `rtl/resgen_m999.sv`, `rtl/residue_adder.sv`: first stage pieces
* `rtl/syngen_m101.sv`, `rtl/syngen_m999.sv`, `rtl/syndrome_decoder.sv`: second stage pieces
* `rtl/checker_stage1.sv`, `rtl/checker_stage2.sv`: one group's checker stages
* `rtl/error_corrector.sv`, `rtl/result_decoder.sv`: the two correction methods
* `rtl/ft_sig_adder.sv`: the top
* `tb/tb_util_pkg.sv` and one `tb/tb_<module>.sv` per module
