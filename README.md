# Bit-serial adder for canonic signed-power-of-two numbers

A multiplierless filter stores each coefficient as a short sum of signed
powers of two, `w = sum_r s(r) 2^g(r)` with `s(r)` in {+1, 0, -1}. The
multiplication by `w` then needs only shifts and a few adds. The most common
sparse form is the **canonic** form (canonic SPT, also called the
non-adjacent form). In this form no two neighbouring digits are both
nonzero, so at most about half of the digits are nonzero.

An adaptive filter changes its weights every iteration
(`new_weight = weight + update`). If the weights are to stay in canonic form,
the adder has to take two canonic numbers and return a canonic number, without
going through 2's complement. This design is such an adder. It is bit-serial:
one digit of each operand enters per clock cycle, least significant digit
first. The sum comes out one digit per cycle, already canonic, with one cycle
of latency. Its whole state is two digits.

## Digit code

Each SPT digit travels on two wires, coded like a 2-bit 2's complement
number:

| digit | code  |
|-------|-------|
| +1    | `01`  |
| 0     | `00`  |
| -1    | `11`  |

Bit 0 says whether the digit is nonzero, and bit 1 gives its sign. The
code `10` is never produced. On an input it reads as 0 (this is a choice of
this design). The type and helper functions are in `rtl/spt_pkg.sv`.

## How the adder works

An ordinary serial adder adds `a_i + b_i + c_i` and outputs the result digit
at once. Here that is not enough. With digits in {-1, 0, +1}, the sum digit at
position `i` may be nonzero right next to a nonzero digit at `i-1`, and the
result would not be canonic. So digit `i-1` is held back for one cycle, until
digit `i` is known, and the pair is rewritten if needed.

In cycle `i`:

1. **Add.** `a_i + b_i + c_i` is split into a carry `c_{i+1}` and an
   intermediate digit `sp_i`. A sum of ±2 gives carry ±1 and `sp_i = 0`. A sum
   of ±1 gives `sp_i = ±1` and no carry. A sum of ±3 cannot occur (see below).
2. **Adjust.** Let `sp_{i-1}` be the digit held from the previous cycle. If
   `sp_i` and `sp_{i-1}` are both nonzero, two identities are used:
   * opposite signs: `2^i - 2^(i-1) = 2^(i-1)`. The output is
     `s_{i-1} = -sp_{i-1}` and `sp_i` becomes 0.
   * same signs: `2^i + 2^(i-1) = 2^(i+1) - 2^(i-1)`. The output is
     `s_{i-1} = -sp_{i-1}`, `sp_i` becomes 0, and the carry `c_{i+1}` takes the
     sign of `sp_i`. In this case the add step produced no carry, so the two
     never collide.

   Otherwise `s_{i-1} = sp_{i-1}` unchanged.

Every adjustment clears `sp_i`. So a nonzero output digit is always followed
by a zero one, and the output is canonic. The canonic form of a number is
unique, so the adder produces exactly the canonic form of `a + b`.

Example: `a = 1`, `b = 2` (`b` is the digit string `0 1 0`, most significant
first).

| cycle | a_i | b_i | c_i | sp_{i-1} | sum | rule            | s_{i-1} | sp_i | c_{i+1} |
|-------|-----|-----|-----|----------|-----|-----------------|---------|------|---------|
| 0     | 1   | 0   | 0   | 0        | 1   | none            | 0       | 1    | 0       |
| 1     | 0   | 1   | 0   | 1        | 1   | same sign       | -1      | 0    | 1       |
| 2     | 0   | 0   | 1   | 0        | 1   | none            | 0       | 1    | 0       |
| 3     | 0   | 0   | 0   | 1        | 0   | none            | 1       | 0    | 0       |

The digits `s_2 s_1 s_0 = 1 0 -1` give `4 - 1 = 3`.

### Why only 37 input combinations occur

The three functions have four ternary inputs (81 combinations). With canonic
operands and `c_0 = 0`, only 37 of them can occur:

* `a_i`, `b_i` and `c_i` are never all nonzero. A carry into position `i`
  needs nonzero digits at `i-1`, and then `a_i` and `b_i` are zero because the
  operands are canonic.
* `c_i` and `sp_{i-1}` are never both nonzero. Both ways of making a carry
  (a sum of ±2, or the same-sign rewrite) leave `sp_{i-1} = 0`.

The 37 feasible rows form the truth table in `tb/table1_rows.svh`. The other
44 combinations are don't-cares, and a gate-level version can use them to
shrink the logic. In this RTL the functions are written as the add and adjust
rules, which also give defined values for those 44 combinations. Synthesis
therefore does not exploit the don't-cares. The two invariants above are
checked as assertions in the top module.

## Structure

```
          a_i b_i              a_i b_i                a_i b_i
            |  |                 |  |                   |  |
          +------+            +------+              +------+
          | f_s  |            | f_sp |              | f_c  |
          +------+            +------+              +------+
             |                    | sp_i               | c_{i+1}
          s_{i-1}               [ D ]                [ D ]
                                  | sp_{i-1}           | c_i
                                  +---> f_s, f_sp, f_c +---> f_s, f_sp, f_c
```

| module             | role |
|--------------------|------|
| `spt_fc`           | `c_{i+1} = f_c(a_i, b_i, c_i, sp_{i-1})`: add-step carry, or the sign of `sp_i` after a same-sign rewrite |
| `spt_fsp`          | `sp_i = f_sp(...)`: add-step digit, cleared when an adjustment applies |
| `spt_fs`           | `s_{i-1} = f_s(...)`: `sp_{i-1}`, negated when an adjustment applies |
| `spt_dreg`         | one-digit D register, used twice (for `sp` and for `c`) |
| `spt_serial_adder` | top: the three functions, the two registers, and word framing |
| `spt_pkg`          | digit type, codes, and the shared add step |

The three functions share only the add step, which is a package function.
Each module makes its own adjustment decision.

## Interface and timing of `spt_serial_adder`

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1 | one digit position per rising edge |
| `rst_n`   | in  | 1 | asynchronous active-low reset; clears both registers and `s_first` |
| `start`   | in  | 1 | high in the cycle that carries digit 0 of a new operand pair |
| `a_i`     | in  | 2 | operand digit `i` |
| `b_i`     | in  | 2 | operand digit `i` |
| `s_im1`   | out | 2 | sum digit `i-1`, combinational from the inputs and the registers |
| `s_first` | out | 1 | high when `s_im1` carries sum digit 0, one cycle after `start` |

The module has no width parameter: the `start` pulses set the word length.
In the `start` cycle the carry and held digit seen by the functions are forced
to 0 (`c_0 = 0`, `sp_{-1} = 0`), and `s_im1` shows `s_{-1} = 0`. Words can
therefore follow each other with no idle cycle in between. Idle cycles
(zero digits without `start`) are also allowed. The adder then keeps flushing
digits of the previous sum, which are zero once the sum is complete.

**Headroom.** The canonic sum of two `M`-digit canonic numbers can need
`M+1` digit positions. In a `W`-digit frame, sum digit `W-1` would leave in
the cycle of the next `start`. It is replaced by 0 there, and any pending
carry or held digit is dropped. So the whole sum must fit in `W-1` positions.
This holds when both operands keep their top two digit positions zero.
Without that headroom the sum is truncated and no flag reports it.

The throughput is one digit per cycle, and a `W`-digit sum is complete
`W` cycles after its `start`. The path from `a_i`/`b_i` to `s_im1` is
combinational.

## What is fixed by the algorithm and what is a choice here

Fixed by the algorithm: the add and adjust rules, the three functions and
their truth table, the two one-digit registers, the one-cycle latency, the
digit code, `c_0 = 0`, and the two invariants.

Choices of this design:

* the `start` framing, including the forced zero state and `s_first`;
* the reset;
* reading code `10` as 0;
* defining the don't-care combinations by the same rules instead of
  minimising them;
* the headroom rule.

Two parts of a complete multiplierless adaptive equalizer are not included:

* the equalizer itself (tap count, step size, weight storage), which the
  algorithm leaves open;
* the converter from 2's complement to canonic form that would produce the
  update term. This is a separately published circuit.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_spt_fc`, `tb_spt_fsp`, `tb_spt_fs` apply all 37 truth-table rows and
  compare against the table. They also apply all 81 input combinations and
  check that no illegal code is ever produced.
* `tb_spt_dreg` checks the reset value, the one-cycle delay of random digits,
  and that the reset acts asynchronously.
* `tb_spt_serial_adder` is the end-to-end test. It streams 3000 operand pairs
  with frame lengths 3 to 40. Operands are either random canonic strings or
  the canonic form of random integers. Every 50th pair is the largest
  canonic value added to itself, which is the worst case for headroom. The
  stream includes back-to-back frames, idle gaps, and frames filled to the
  top (overflow). The test
  compares each output digit with the canonic form of the integer sum,
  computed independently by the usual recoding. It checks the one-cycle
  latency through `s_first`, and checks that the output stream stays canonic.
  A digit-level model counts how often each mechanism occurs: add-step carry,
  opposite-sign and same-sign rewrites, `start` over leftover state, and idle
  gaps. The model also checks that every input combination met is one of the
  37 table rows and that all 37 are reached. Any mechanism never seen counts
  as a failure.

Running a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/` (the testbenches include `tb/table1_rows.svh` by that path):

```
verilator --binary --timing --assert -I. \
  rtl/spt_pkg.sv rtl/spt_fc.sv rtl/spt_fsp.sv rtl/spt_fs.sv rtl/spt_dreg.sv \
  rtl/spt_serial_adder.sv tb/tb_spt_serial_adder.sv --top-module tb_spt_serial_adder
./obj_dir/Vtb_spt_serial_adder
```

Lint with `verilator --lint-only -Wall` gives only two kinds of warning:

* unused bits: the upper bits of the shared add-step result in
  `spt_fsp`/`spt_fs`, and bit 1 of a digit in the nonzero test;
* `rst_n` used both as an asynchronous reset and in the assertions'
  `disable iff` condition.
