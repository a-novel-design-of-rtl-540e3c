# CSD recoders with a fault tolerant carry chain

Canonic signed digit (CSD) form writes a number with digits in {-1, 0, +1}
so that no two neighbouring digits are non-zero. That leaves the fewest
non-zero digits possible, which is why constant multipliers and filters
built from shifts and adds like it. Converting to CSD is a carry-chain
problem: a run of ones `0111…1` becomes `+1 0 0 … 0 -1`. This RTL builds
the carry chain from *fault tolerant full adders* (FTFA). Each adder checks
its own sum and carry, reports a wrong output and inverts it back. A stuck
sum, a stuck carry, or both at once in one adder therefore neither corrupt
the CSD result nor spread along the chain.

Two recoders are provided, side by side in the top module `csd_ftfa_top`:

| path | input | output | latency |
|---|---|---|---|
| two's complement → CSD (`tc2csd`) | N+1 bits `x` and an initial carry | N CSD digits, final carry, 2·N fault flags | 1 clock |
| redundant binary → CSD (`rb2csd`) | N+1 redundant binary (RB) digits | same | 3 clocks |

Both accept a new input on every clock and never stall. N defaults to 4.

## Digit encoding

One signed digit is the packed struct `csd_pkg::sd_digit_t = {s, d}`:

| {s, d} | digit |
|---|---|
| 00 | 0 |
| 01 | +1 |
| 10 | −1 |
| 11 | illegal |

RB input digits and CSD output digits use the same encoding. Vectors of
digits are packed arrays `sd_digit_t [N-1:0]`, with digit 0 the least
significant. The two-letter strings in this document are written `{s,d}`,
so `01` means +1.

## The fault tolerant full adder

`full_adder` is a plain adder. `fa_dft` adds a checker to it, built from
two identities that a working adder always satisfies:

* `sum ^ b == a ^ cin`. The checker forms X1 = a⊕cin and X2 = ¬(sum⊕b), and
  raises `fs = ¬(X1⊕X2)`. This is 0 when the identity holds and 1 when the
  sum is wrong.
* `cout` differs from `b` exactly when `a == cin != b`. The checker forms
  F1 = a·b̄·cin + ā·b·c̄in and X3 = ¬(cout⊕b), and raises `fc = ¬(X3⊕F1)`.

The two checks are independent, so a fault on both outputs at once (a
"double fault") is seen as well. `ftfa` puts a 2:1 multiplexer on each
output. It passes the sum when `fs = 0` and the inverted sum when `fs = 1`,
and treats the carry the same way under `fc`. A wrong single bit can only
be the inverse of the right one, so the outputs `sumf`/`coutf` are always
correct. Meanwhile `fs`/`fc` show which adder was hit and which of its
outputs was wrong.

The scheme rests on these assumptions:

* Faults sit in the adder, not in the checker. A fault inside the checker
  or the multiplexers can corrupt an output that was correct.
* A fault on an adder *input* is not detected, because the checker reads the
  same inputs as the adder.

### Fault injection

To exercise the checker, every FTFA takes a `csd_pkg::fa_fault_t` with four
fields: `sum_en`, `sum_val`, `cout_en` and `cout_val`. When an enable is set,
the adder's sum or carry net is stuck at the given value. Injection covers
only the adder nets, ahead of the checker. The ports run up to the top as
`tc_fault` and `rb_fault`, one entry per bit position. Tie them to `'0` in
use; they then cost only a few constant multiplexers, which synthesis
removes.

## Two's complement to CSD (`tc2csd`)

The recoding carry is

    c(i+1) = x(i+1)·x(i) + (x(i+1) + x(i))·c(i),   c(0) = cin

This is the carry of a full adder with inputs x(i+1), x(i) and c(i). The
chain is therefore an ordinary ripple-carry adder of `x >> 1` and `x`:
`ftfa_rca` with `a = x[N:1]` and `b = x[N-1:0]`. Its sum bits
s(i) = x(i+1)⊕x(i)⊕c(i) feed a second logic level with one dual-output
function per digit:

    t(i)   = s(i) ⊕ x(i+1)        (= x(i) ⊕ c(i))
    y(i).d = ¬x(i+1) · t(i)       digit +1
    y(i).s =  x(i+1) · t(i)       digit −1

Digit i is non-zero exactly when t(i) = 1. In that case c(i+1) = x(i+1), so
t(i+1) = 0, which is why the output can never have two adjacent non-zero
digits.

**Value.** The digits satisfy Σ y(i)·2^i = x[N-1:0] + cin − 2^N·cout, where
`cout` = c(N). Bit x[N] is only a look-ahead bit for digit N−1. For a
signed N-bit number, sign-extend it into x[N] and set cin = 0. The digits
then equal its two's complement value, and cout equals the sign. Other
inputs give a recoding of one N-bit slice of a longer word: cout carries
into the next slice, and cin comes from the previous one.

Example: x = `10101` with cin = 0 gives, from digit 0 upward, `01 00 01 00`
(+1 at bits 0 and 2, value 5).

**Timing.** The digits, `cout` and the per-bit flags `fs`/`fc` are all
registered on the rising edge, so each flag lines up with the result it
belongs to. The ripple chain of N FTFAs plus one LUT level is the critical
path.

## Redundant binary to CSD (`rb2csd`)

An RB digit (s, d) is worth d − s, so the number is D − S = D + ~S + 1.
`rb2tc` is a ripple adder of D and ~S with initial carry e(0) = 1. For legal
digits this reduces to

    e(i+1) = ¬s(i)·d(i) + e(i)·¬(s(i)+d(i)),   x(i) = ¬(s(i)+d(i)) ⊕ e(i)

and yields (D − S) mod 2^(N+1). The converter uses plain full adders; only
the recoder's chain is fault tolerant.

Pipeline:

1. register the N+1 RB digits;
2. convert with `rb2tc` and register the (N+1)-bit result X;
3. recode X with `tc2csd` (cin = 0), whose output register is this stage.

The digits satisfy Σ y(i)·2^i = X[N-1:0] − 2^N·cout. For RB numbers within
N-bit two's complement range (−8…7 for N = 4) this is the exact value. The
fault pattern applied at `rb_fault` affects the result that leaves the
pipeline at the next rising edge. An assertion flags an illegal RB digit
`11` at the input.

Example: five +1 digits (value 31) exceed the 4-digit range. They give
X = `11111`, recoded as −1 at bit 0 with cout = 1 (15 − 16).

## Interfaces

`csd_ftfa_top #(N = 4)`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | shared clock; asynchronous active-low reset clears all registers |
| `tc_x` | in | N+1 | two's complement input |
| `tc_cin` | in | 1 | initial carry |
| `tc_fault` | in | N × `fa_fault_t` | fault injection, test only |
| `tc_y` | out | N × `sd_digit_t` | CSD digits |
| `tc_cout` | out | 1 | final carry c(N) |
| `tc_fs`, `tc_fc` | out | N each | per-adder sum / carry fault flags |
| `rb_in` | in | (N+1) × `sd_digit_t` | RB input digits |
| `rb_fault` | in | N × `fa_fault_t` | fault injection, test only |
| `rb_y`, `rb_cout`, `rb_fs`, `rb_fc` | out | as above | RB path results |

Module hierarchy:

    csd_ftfa_top
    ├── tc2csd ── ftfa_rca ── ftfa × N ── fa_dft ── full_adder
    └── rb2csd ─┬ rb2tc ── full_adder × (N+1)
                └ tc2csd (as above)

`csd_pkg` holds the two shared types.

## Where this RTL makes its own choices

* **Widths.** N = 4: a 5-bit two's complement input, or 5 RB digits, gives
  4 CSD digits. The ripple-carry adder is 4 bits.
* **Digit order.** The encoding follows the recoding equations and the RB
  input convention (d = +1, s = −1). The pair is written `{s, d}`.
* **Sum correction.** Inverting the sum when `fs = 1` mirrors the carry
  multiplexer.
* **Pipeline.** tc2csd has one register stage, at its outputs. rb2csd has
  three: input, converted value and output.
* **Reset and flags.** The reset is asynchronous and active-low. The fault
  flags are registered with the data.
* **Top-digit carry.** The carry out of the top RB digit in `rb2tc` is
  dropped.
* **Fault injection.** The fault-injection inputs are a test feature and add
  ports beyond the recoders' functional pins.
* **A different published result.** One published simulation of the RB
  recoder reports all-zero digits for the input `01,01,01,01,01`. That
  contradicts the conversion equations, and this RTL follows the
  equations.
* **Not modelled.** FPGA-specific mapping is not modelled: multiplexer-based
  carry chains, dual-output LUTs and slice placement. The logic is written
  generically, and a synthesis tool chooses the mapping.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog.

| testbench | what it covers |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_fa_dft` | all inputs × all 16 stuck-at patterns; flags exactly when an output is wrong |
| `tb_ftfa` | same sweep; corrected outputs always equal a+b+cin; example 1,1,0 → sum 0, carry 1 |
| `tb_ftfa_rca` | every a, b, cin without faults, then 5000 random cases with random faults per bit; flags checked against per-bit partial sums |
| `tb_rb2tc` | all 243 legal 5-digit RB numbers |
| `tb_tc2csd` | all 64 (x, cin) pairs, 2000 random ones with faults, signed −8…7, example `10101`; checks latency 1 and that outputs hold until the edge |
| `tb_rb2csd` | all 243 legal RB inputs streamed back-to-back without and with faults, plus random ones; checks latency 3 and exact values in range |
| `tb_csd_ftfa_top` | both paths at default size, 4000 cycles with random faults; also counts repaired sum, carry and double faults, −1 and +1 digits, cin = 1 and back-to-back RB results, and fails if any count is zero |

The check on a CSD result needs no copy of the recoding algorithm. It
requires:

* legal, non-adjacent digits with the expected value (a non-adjacent form
  is unique);
* the final carry to match the integer sum x[N:1] + x[N-1:0] + cin.

To run one with Verilator, for example the top:

    verilator --binary --timing --assert -Irtl rtl/csd_pkg.sv tb/tb_csd_ftfa_top.sv \
        --top-module tb_csd_ftfa_top -o sim
    ./obj_dir/sim

Every testbench finishes in well under a second. `tb_csd_ftfa_top` runs the
top at its default parameters.

Lint notes:

* `verilator -Wall` warns that bit `e[W]` in `rb2tc` is unused. That is the
  dropped carry out.
* It also warns that `rst_n` is used both as an asynchronous reset and in
  the `disable iff` of the RB-digit assertion. That is intended.
