# Six-operand radix-2 signed-digit adder

This is a combinational adder that sums six radix-2 signed-digit (SD) numbers
at once. The delay is the same whatever the word length, because no carry
travels more than two digit places. It is SystemVerilog RTL for a published
multi-operand SD addition scheme. The original was designed as a current-mode
MOSFET circuit. Here it is written as synthesizable digital logic, with the
same digit-level function.

## Signed digits and why two operands are easy

A radix-2 SD number is `X = sum x_i * 2^i`, where each digit `x_i` is -1, 0
or +1. Most values can be written in several ways. That redundancy is what
lets a two-operand adder avoid carry ripple. At each place the digit sum
`z_i = x_i + y_i` lies in -2..2. It is rewritten as `2*c_i + w_i`. When
`z_i` is ±1 there are two ways to do this, and the adder picks one by looking
at the place below:

| z_i | z_{i-1} > 0: c_i, w_i | z_{i-1} <= 0: c_i, w_i |
|-----|----------------------|------------------------|
|  2  | 1, 0                 | 1, 0                   |
|  1  | 1, -1                | 0, 1                   |
|  0  | 0, 0                 | 0, 0                   |
| -1  | 0, -1                | -1, 1                  |
| -2  | -1, 0                | -1, 0                  |

If `z_{i-1} > 0`, the carry that arrives from below can only be 0 or +1.
So `w_i` is kept at -1 or 0, and `s_i = w_i + c_{i-1}` is always a single
digit. The other column is the mirror image. This is `sd_add2`.

## The problem with six operands, and the parity split

With six operands, a column sum `z_i` can be anywhere in -6..6. That needs
three SD digits: `z_i = 4*d_i + 2*c_i + w_i`. The carry `c_i` goes to place
`i+1` and the carry `d_i` goes to place `i+2`. If every place had operand
digits, place `i` would have to absorb `c_{i-1}`, `d_{i-2}` and its own
`w_i`. That can overflow a digit, and then the carries ripple again.

The trick is to split every operand into two parts:

* the **even part** keeps the digits at places 0, 2, 4, … and has zeros elsewhere;
* the **odd part** keeps the digits at places 1, 3, 5, … and has zeros elsewhere.

The six even parts are added together in one adder, and the six odd parts in
another. Inside one part adder, every other place is empty. So:

* the empty place `i+1` has nothing of its own, and its result digit is just `c_i`;
* the populated place `i` only has to absorb `d_{i-2}`, so `s_i = w_i + d_{i-2}`.

The same selection idea as in the two-operand case keeps `s_i` a single
digit. Let `e_i = (z_i > 0)`. If `e_{i-2} = 1`, then `d_{i-2}` is 0 or +1,
and `w_i` is chosen from {-1, 0}. If `e_{i-2} = 0`, then `d_{i-2}` is 0 or
-1, and `w_i` is chosen from {0, +1}. The full selection, as built in
`sdfa6`:

| z_i | e_{i-2}=1: d, c, w | e_{i-2}=0: d, c, w |
|-----|--------------------|--------------------|
|  6  | 1, 1, 0            | 1, 1, 0            |
|  5  | 1, 1, -1           | 1, 0, 1            |
|  4  | 1, 0, 0            | 1, 0, 0            |
|  3  | 1, 0, -1           | 0, 1, 1            |
|  2  | 0, 1, 0            | 0, 1, 0            |
|  1  | 0, 1, -1           | 0, 0, 1            |
|  0  | 0, 0, 0            | 0, 0, 0            |
| -1  | 0, 0, -1           | 0, -1, 1           |
| -2  | 0, -1, 0           | 0, -1, 0           |
| -3  | 0, -1, -1          | -1, 0, 1           |
| -4  | -1, 0, 0           | -1, 0, 0           |
| -5  | -1, 0, -1          | -1, -1, 1          |
| -6  | -1, -1, 0          | -1, -1, 0          |

The limit of six operands follows from this. A column sum must fit in the
three digits `d c w`, and `w` must leave room for the incoming `d_{i-2}`.
With `w = 0`, the largest such value is `(1 1 0)` in SD form, which is 6.

Each part sum has N+2 digits. A final `sd_add2` adds the two part sums into
an N+3 digit result. The depth is one six-input full adder, then one
final-sum stage, then one two-operand SD adder. None of these depends on N.

```
 op[0..5] ──┬── even places ──► sd_madd_part (PARITY=0) ──► s_even [N+2] ──┐
            │                                                            ├─► sd_add2 ──► sum [N+3]
            └── odd places  ──► sd_madd_part (PARITY=1) ──► s_odd  [N+2] ──┘
```

## Modules

| module | role |
|--------|------|
| `sd_pkg` | digit type `sd_digit_t`, digit constants, `NUM_OPS = 6`, `sd_valid()` |
| `sdfa6` | six-input SD full adder for one place: z, Table above, e, s = w + d_{i-2} |
| `sd_madd_part` | one parity: a row of `sdfa6`, with e/d chained two places up and c placed one place up |
| `sd_add2` | two-operand carry-free SD adder, W digits in, W+1 out |
| `sd_madd6` | top: operand split, two `sd_madd_part`, final `sd_add2` |

### Digit encoding

A digit is a 2-bit two's complement value: `2'b01` = +1, `2'b00` = 0,
`2'b11` = -1. The code `2'b10` is illegal. The modules check with immediate
assertions that their inputs never carry it. Because of this encoding,
`int'(digit)` gives the digit's value directly. A multi-digit number is an
unpacked array of digits in which index `i` has weight `2^i`.

### Top-level interface (`sd_madd6`, parameter `N = 8`)

| port | direction | type | meaning |
|------|-----------|------|---------|
| `op` | in | `sd_digit_t [6][N]` | `op[j][i]` is digit i of operand j (K, L, M, N, O, P) |
| `s_even` | out | `sd_digit_t [N+2]` | sum of the six even parts |
| `s_odd` | out | `sd_digit_t [N+2]` | sum of the six odd parts |
| `sum` | out | `sd_digit_t [N+3]` | K+L+M+N+O+P |

There is no clock and no reset: the whole design is one combinational path.
Some output digits are zero by construction. For example, at N = 8 the top
digit of `s_even` and digit 0 of `s_odd` are always zero. The N+2 / N+3
widths are kept so that the widths do not depend on whether N is odd or even.

## Worked example (N = 8)

Operands, most significant digit first (`-` stands for -1):

```
K = 1 1 - - 1 0 - -   = 149      N = 0 1 0 0 1 1 1 0 =  78
L = 1 - 1 0 0 0 - -   =  93      O = 1 0 0 1 - 0 - 0 = 134
M = 1 0 1 0 - 0 0 1   = 153      P = 0 0 0 - - 0 1 - = -23
```

The even-place column sums at places 0, 2, 4, 6 are -2, 1, -1, 1. The
adder gives `s_even = 0 0 0 1 0 - 0 1 - 0` (value 50). The odd part gives
value 534, and `sum` has value 584. The end-to-end testbench checks these
results.

## Departures and choices

The arithmetic follows the published scheme exactly: the parity split, both
selection tables, `e_i = (z_i > 0)`, and the N+2 / N+3 result widths. The
choices below are this implementation's own:

* **Logic instead of current-mode circuits.** The original realises a digit
  as a unit current whose direction gives its sign. Its building blocks are
  analog: current mirrors, a bidirectional current input stage that splits
  positive and negative currents, and threshold detectors whose threshold is
  set by transistor width. That circuit is not reproduced element by
  element. `sdfa6` implements the function it computes, taken from the
  selection table.
* **Digit encoding:** the 2-bit two's complement code described above.
* **Ends of the chains.** The lowest place of each adder sees no carry,
  `e_{i-2} = 0` in `sd_madd_part`, and `z_{-1} = 0` in `sd_add2`. Above the
  last full adder, the leftover `c` and `d` carries become the top digits.
* **Operand split.** `sd_madd_part` takes full N-digit operand parts and
  asserts that the digits of the other parity are zero. The split itself is
  wiring in `sd_madd6`.
* **Extra outputs.** The part sums `s_even` and `s_odd` are brought out as
  well as the final sum.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line.

* `tb_sdfa6` tries every six-digit input with both values of `e_{i-2}` and
  each carry consistent with it (2916 cases). The expected outputs are
  derived arithmetically, not from the table.
* `tb_sd_madd_part` runs random and biased operand sets through 7-digit and
  8-digit adders of both parities, using the helper `sd_madd_part_harness`.
  It also checks the exact digits of the worked example.
* `tb_sd_add2` is exhaustive over all pairs of 4-digit operands, runs random
  10-digit pairs, and checks two digit-level cases of the selection rule.
* `tb_sd_madd6` runs the whole adder at its default size. It checks the
  worked example and 20 000 random operand sets. It also counts how often
  each mechanism occurs and fails if one never does: a column sum of ±6, a
  ±1 carry `d` in each part adder, an odd column resolved with
  `e_{i-2} = 1` and with `e_{i-2} = 0`, and a ±1 carry in the final adder.
* `tb_sd_madd6_sizes` runs the whole adder at N = 1, 2, 7 and 16 with
  random and biased operands, using the helper `sd_madd6_harness`.

Each testbench has also been run against a deliberately broken copy of its
module, and it fails there.

The original circuit was verified by transistor-level simulation, and its
advantages in speed and power over a tree of two-operand adders are
circuit-level claims. This RTL tests the arithmetic only, not delay or power.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/sd_pkg.sv tb/tb_sd_madd6.sv \
          --top-module tb_sd_madd6 -o sim
./obj_dir/sim
```

Replace `tb_sd_madd6` with `tb_sdfa6`, `tb_sd_madd_part`, `tb_sd_add2` or
`tb_sd_madd6_sizes` to run the other tests. `sd_pkg.sv` must be compiled first. Each test runs in
well under a second.

## Changing it

* **Word length:** set `N` on `sd_madd6`. It sizes both part adders
  (`N+2` digits out) and the final adder (`W = N+2`).
* **Number of operands:** fixed at six by `NUM_OPS` in `sd_pkg`. Six is the
  most this scheme supports without ripple, and `sdfa6`'s table covers
  exactly -6..6. Fewer operands can be added by driving the unused operands
  with zeros.
* **Pipelining:** there are no registers. To register inputs or outputs,
  wrap `sd_madd6`; the inside needs no change.
