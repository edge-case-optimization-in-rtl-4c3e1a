# 8-bit multiplier with Vedic shortcuts for edge cases

A general 8x8 multiplier is sized for the worst case. Some operand pairs have a
much cheaper closed form, though. This design catches two of them and computes
them with small dedicated circuits based on two Vedic-mathematics rules:

- **Nikhilam** ("all from 9 and the last from 10"): a product with the constant
  0xFF, which is the base 0x100 minus one.
- **Yavadunam** ("whatever the extent of its deficiency"): the square of a
  number just below the base, here 0xF0 to 0xFF.

All other products go to an ordinary multiplier. A chain of selectors picks
which result reaches the output. The whole design is combinational: there is
no clock, no reset and no state.

The idea is worth knowing, but so is its cost. Each shortcut unit is much
smaller and faster than a full multiplier. Once the compares and the selector
chain are added, though, the combined multiplier is larger and slower than the
plain multiplier alone. The combined unit is useful for studying that
trade-off. The shortcut units on their own are useful wherever the operands
are known to be in their range, for example scaling by a fixed 0xFF.

## The Nikhilam unit (`ns`): multiply by 0xFF

For a byte x:

    x * 0xFF = x * 0x100 - x = (x - 1) * 0x100 + (0xFF - (x - 1))

So the high byte of the product is `x - 1`, and the low byte is `0xFF - (x - 1)`.
A subtraction from all-ones never borrows, so the low byte is just
`(x - 1) ^ 0xFF`. The whole unit is one 8-bit decrement and eight XOR gates.

Example: 0x23 * 0xFF gives a high byte of 0x22 and a low byte of
0x22 ^ 0xFF = 0xDD, so the product is 0x22DD.

**Edge case:** the rule holds for x = 1 to 255. For x = 0 the decrement wraps,
so the unit outputs 0xFF00 instead of 0. The unit is kept exactly as the rule
defines it. The top level removes this case with its zero bypass (see below).

## The Yavadunam unit (`ys_f` + `fast_mult`): squares of 0xF0 to 0xFF

Write x = 0xF0 + n. Then x is short of 0x100 by the deficiency d = 0x10 - n,
so d runs from 1 to 16. Then:

    x^2 = (x - d) * 0x100 + d^2

The unit computes:

1. The deficiency: a 5-bit subtraction `0x10 - x[3:0]`.
2. The high byte: `x - d`.
3. The square d^2: read from `fast_mult`, a 32-entry constant table. Entry i
   holds i*i for i = 0 to 16, and the unused entries hold 0. The table is
   filled from that formula when the design is elaborated.
4. The carry: d^2 reaches 0x100 when x = 0xF0. Its ninth bit is therefore
   added into the high byte, and its low eight bits form the low byte.

Example: for x = 0xFF, d = 1. The high byte is 0xFE and the low byte is 0x01,
so the result is 0xFE01.

The formula only holds when the high nibble of x is 0xF. For any other input
the output is meaningless, and the top level never selects it.

## Selection chain (`vedic_top`)

The top level starts from the general multiplier's product. It then passes
that product through four 2:1 selectors. Each selector can replace the value
with a higher-priority result, and the **last** stage wins:

| stage | condition                         | result taken         | flag           |
|-------|-----------------------------------|----------------------|----------------|
| 0     | (default)                         | external `mult_p`    | `path_general` |
| 1     | `b == 0xFF`                       | `ns(a)`              | `path_ns_a`    |
| 2     | `a == 0xFF`                       | `ns(b)`              | `path_ns_b`    |
| 3     | `a == b` and `a[7:4] == 0xF`      | `ys_f(a)`            | `path_ys`      |
| 4     | `a == 0` or `b == 0`              | 0                    | `path_zero`    |

Consequences of the ordering:

- **Zero wins over everything.** This is what makes 0 * 0xFF correct, since
  the Nikhilam unit alone would give 0xFF00.
- **0xFF * 0xFF:** this pair matches stages 1, 2 and 3. The squarer wins, and
  all three would give the same answer (0xFE01).
- **Any operand pair gives exactly a * b**, provided the external multiplier
  is correct.

The `path_*` outputs are one-hot. They report which unit produced `p`. They are
this design's addition and are not needed for the product itself. The
assignment of the two Nikhilam instances (one watches `b == 0xFF`, the other
`a == 0xFF`) is also this design's choice. Swapping the assignment changes no
product.

### The general multiplier is external

The default path uses a vendor multiplier core: an unsigned, purely
combinational 8x8 multiplier with no pipeline stages. It is not part of this
RTL. `vedic_top` sends the operands out on `mult_a`/`mult_b` and takes the
product back on `mult_p`. Any combinational unsigned 8x8 multiplier fits,
including a plain `assign mult_p = mult_a * mult_b;` in the enclosing module.
A model with the core's port names (`A`, `B`, `P`) is in `tb/mult_gen_0.sv`
for simulation.

If a registered (pipelined) multiplier is connected instead, the shortcut paths
no longer line up with it in time. The chain would then need matching
registers, and this design does not provide them.

## Ports of `vedic_top`

| port           | dir | width | meaning                                  |
|----------------|-----|-------|------------------------------------------|
| `a`, `b`       | in  | 8     | unsigned operands                        |
| `p`            | out | 16    | a * b                                    |
| `mult_a`       | out | 8     | operand a for the external multiplier    |
| `mult_b`       | out | 8     | operand b for the external multiplier    |
| `mult_p`       | in  | 16    | product from the external multiplier     |
| `path_zero`    | out | 1     | result forced to 0                       |
| `path_ys`      | out | 1     | result from the Yavadunam squarer        |
| `path_ns_b`    | out | 1     | result from the Nikhilam unit on b       |
| `path_ns_a`    | out | 1     | result from the Nikhilam unit on a       |
| `path_general` | out | 1     | result from the external multiplier      |

`p` is valid one combinational delay after `a`, `b` and `mult_p` settle.

## Files

| file                 | content                                                       |
|----------------------|---------------------------------------------------------------|
| `rtl/vedic_pkg.sv`   | widths, byte/product/deficiency types, constants 0xFF, 0x10, 0xF |
| `rtl/ns.sv`          | Nikhilam multiply-by-0xFF                                     |
| `rtl/fast_mult.sv`   | 17-value square table (0..16)                                 |
| `rtl/ys_f.sv`        | Yavadunam squarer, uses `fast_mult`                           |
| `rtl/vedic_top.sv`   | selection chain, two `ns`, one `ys_f`                         |
| `tb/tb_*.sv`         | one self-checking testbench per module                        |
| `tb/mult_gen_0.sv`   | simulation model of the external multiplier                   |

The 8-bit width is fixed. The package names the widths so the code reads in
terms of bytes and nibbles, but the method itself is specific to 8 bits. The
deficiency is taken from the low nibble only, and the constant is 0xFF.
Widening the design means changing the rules, not just a parameter.

## Verification

Every testbench is exhaustive over its input domain. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_ns`: all 256 inputs. Inputs 1 to 255 must give in * 255, and input 0
  must give 0xFF00. It also checks the worked example.
- `tb_fast_mult`: all 17 legal indices.
- `tb_ys_f`: all 16 inputs 0xF0 to 0xFF, including the overflow case 0xF0.
- `tb_vedic_top`: all 65,536 operand pairs, twice.
  - The first pass uses a correct external multiplier. It checks the product,
    that the flags are one-hot and name the expected unit, and that the
    operands reach the multiplier port unchanged.
  - The second pass inverts the external product. Every Vedic or zero path must
    still be right, which shows those paths compute the result themselves.
  - The testbench counts how often each of the five paths is taken, and
    fails if any path is never taken.

To run one with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb rtl/vedic_pkg.sv \
        tb/tb_vedic_top.sv --top-module tb_vedic_top -Mdir obj
    ./obj/Vtb_vedic_top

Replace `tb_vedic_top` with `tb_ns`, `tb_ys_f` or `tb_fast_mult` to run the
others. Each one finishes in well under a second.
