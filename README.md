# Parallel-prefix magnitude comparator (128-bit, combinational)

This is an unsigned magnitude comparator for two wide operands, 128 bits by
default. It gives three one-hot outputs: `agb` (A > B), `aeb` (A = B) and
`alb` (A < B). It is built only from plain gates (XOR, NOR, AND, OR). The
circuit has no clock and no state.

The main idea is to compare from the most significant bit downward, and to
stop as soon as the result is known. The operands are cut into 4-bit
modules. Each module passes an *enable* to the module below it, but only
while every bit so far has been equal. The first module that finds a
difference makes the decision. All modules below it are switched off, and
their outputs stay at 0. In CMOS this saves switching activity, and so
dynamic power, on typical inputs. The worst case is the opposite: operands
that agree everywhere except at the LSB (or agree completely) enable every
module.

```
 a[127:0] b[127:0]
     |       |
 +---v-------v------------------------------------------+
 | comparison_module: 32 x cmp4_module, enable chain    |
 |   module 31 (bits 127..124)  en=1 in                 |
 |   module 30 (bits 123..120)  en = en31 & bits equal  |
 |   ...                                                |
 |   module 0  (bits 3..0)                              |
 +---------+------------------------------+-------------+
     left_bus[127:0]               right_bus[127:0]
 +---------v------------------------------v-------------+
 | decision_module: radix-4 OR tree  128 -> 32 -> 8 -> 2|
 |                  decision_final   2 -> gt / eq / lt  |
 +------------------------------------------------------+
```

## The left and right buses

The comparing stage does not send "greater or less" signals directly.
Instead it writes two N-bit buses, and at most **one bit of both buses
together** is ever 1. That bit sits at the most significant position where
A and B differ:

| situation at the highest differing bit p | left_bus | right_bus |
|---|---|---|
| A[p] = 1, B[p] = 0 (A > B) | bit p = 1 | all 0 |
| A[p] = 0, B[p] = 1 (A < B) | all 0 | bit p = 1 |
| no differing bit (A = B) | all 0 | all 0 |

So the decision stage only needs to know *whether* each bus has a set bit.
That is a plain OR reduction: `gt = |left_bus`, `lt = |right_bus`, and
`eq = !(gt | lt)`. It does not need to know where the bit is, so no priority
logic is needed after the comparing stage. All the priority logic is local
to each 4-bit module. The enable chain supplies the rest.

## Inside one 4-bit module: the five sets

`cmp4_module` is five small stages, each in its own file. For a module with
bits `a[3:0]`, `b[3:0]` and enable `en_in` from the module above:

| set | module | function |
|---|---|---|
| 1 | `set1_xor` | `D = a ^ b`: which bits differ |
| 2 | `set2_nor` | `S2 = ~|D`: all four bits are equal |
| 3 | `set3_and` | `en_out = en_in & S2`: enable for the module below |
| 4 | `set4_priority` | `S4[k] = en_in & D[k] & ~D[j]` for all j > k: one-hot select of the highest differing bit |
| 5 | `set5_gate` | `left = S4 & a`, `right = S4 & b`: drive the buses |

In set 4, bit 3 has the highest priority (`S4[3] = en & D[3]`), then bit 2
(`en & D[2] & ~D[3]`), and so on. Set 5 is a pair of AND gates per bit.
Because `S4` selects a bit where A and B differ, exactly one of `a[k]` and
`b[k]` is 1 there. That puts the 1 on the correct bus.

Set 3 is what makes this a prefix structure. Over the whole chain,
`en_in` of module k is the AND of the set-2 outputs of every module above
it. That is a prefix-AND from the MSB downward. Here it is built as a
ripple chain of 2-input ANDs, one per module. So the chain passes through
up to 32 AND gates from the top module to the bottom one. This is the
longest path, and it is the path taken by the worst-case operands.

## Decision tree

`decision_module` builds the OR tree at elaboration time. Each
`sub_decision` node ORs four left bits into one, and does the same for four
right bits. Levels repeat until at most four bits per bus remain. Then
`decision_final` ORs those bits and encodes `gt`, `eq` and `lt`. The top
level renames these to `agb`, `aeb` and `alb`.

| N | levels of 4-input nodes | bits left for the final node |
|---|---|---|
| 128 | 128 -> 32 -> 8 -> 2 | 2 |
| 64 | 64 -> 16 -> 4 | 4 |
| 32 | 32 -> 8 -> 2 | 2 |
| 16 | 16 -> 4 | 4 |
| 8 | 8 -> 2 | 2 |

If a level's width is not a multiple of four, the last node's missing
inputs are tied to 0. An example is N = 20, which runs 20 -> 5 -> 2. The
helper functions `dec_levels` and `dec_width` in `cmp_pkg` compute the
level sizes.

## Parameters and interface

`prefix_comparator #(N = 128)`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | N | unsigned operands, bit N-1 is the MSB |
| `agb` | out | 1 | A > B |
| `aeb` | out | 1 | A = B |
| `alb` | out | 1 | A < B |

- **N** must be a multiple of 4. The default is 128, which gives 32
  modules. The evaluated sizes of 8, 16, 32 and 64 bits are all tested.
- **Module width** is `cmp_pkg::GROUP = 4`.
- **Decision radix** is `cmp_pkg::DEC_RADIX = 4`.
- **Timing.** The design is fully combinational. The outputs settle one
  propagation delay after the inputs change. There is no latency in cycles
  and no handshake. Register the inputs or outputs outside if you need a
  pipeline stage.
- **Enable chain.** The `en` output of `comparison_module` is the enable
  chain: `en[k]` is the enable into module k, and `en[0]` means all bits
  are equal. The top keeps it internal, so it drives no port. The
  testbenches read it hierarchically to see where the comparison stopped.

Size after generic synthesis at N = 128: about 570 word-level cells. This
includes 32 four-bit XORs and roughly 250 single-bit ANDs. There are no
flip-flops.

## Interpretation choices

The published description of this comparator contradicts itself in places.
Where it does, this RTL takes the reading that makes a correct comparator:

- **Which bus means "greater".** One statement of the encoding puts
  A > B on the right bus. Another, and the set-5 circuit of the design this
  one derives from, connect A to the left output and B to the right one.
  The RTL follows the second: the left bus carries A > B.
- **Set-3 inputs.** Set 3 was written as the AND of the current and the
  *previous* module's set-2 outputs. Taken literally, a module would look
  only one module up. The RTL ANDs the incoming enable (the previous
  module's set-3 output) with the current set-2 output, so the enable
  covers all higher modules. This matches how the modules are said to
  enable each other.
- **Priority inside a module.** The set-4 equations are indexed so that
  "bit 1" has the highest priority. But the bits are numbered 4..1 with 4
  as the MSB, and comparison is stated to run from MSB to LSB. The RTL
  gives the module's MSB the highest priority.
- **Per-module decision outputs.** A single-module drawing shows local
  A > B / A < B / A = B gates. In the full architecture, each module feeds
  only its bus bits and enable to the shared decision tree. The local
  decision is therefore not built.
- **Set 3 as a chain, not a tree.** Set 3 is meant to bound fan-in and
  fan-out whatever the operand width, with a maximum fan-in of five and
  fan-out of four. No tree for it is given, and the modules are described
  as enabling one another in sequence. So set 3 here is a single 2-input
  AND per module. Each module's enable drives that AND and the four set-4
  gates, a fan-out of five. A log-depth prefix-AND tree would shorten the
  worst-case path if needed. The module interfaces would not change.
- **Top enable.** The enable into the most significant module is tied
  to 1.
- **Not covered.** The transistor-level transmission-gate version of set 5
  is not modelled; it belongs to the earlier design that this one replaces.
  The power and delay figures (0.28 mW, 0.087 ms at 128 bits in a 0.18 µm
  process) are technology results, and RTL cannot reproduce them.

## Files

| file | content |
|---|---|
| `rtl/cmp_pkg.sv` | module width, decision radix, tree-size functions |
| `rtl/set1_xor.sv` ... `rtl/set5_gate.sv` | the five sets of a module |
| `rtl/cmp4_module.sv` | one 4-bit module |
| `rtl/comparison_module.sv` | N/4 modules and the enable chain |
| `rtl/sub_decision.sv`, `rtl/decision_final.sv` | decision tree nodes |
| `rtl/decision_module.sv` | the generated OR tree |
| `rtl/prefix_comparator.sv` | top level |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/comparator_widths_tb.sv` | 8/16/32/64/128-bit instances with the worst-case stimulus |

## Verification

Each testbench compares the hardware with a reference written separately.
The references use SystemVerilog's relational operators, or a loop that
finds the highest differing bit. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a time-out watchdog.

- The five sets, one module, and both decision nodes are tested
  exhaustively at 4 bits.
- `comparison_module_tb` uses 128-bit operands. For every bit position it
  makes operand pairs that differ first at that bit. It also uses equal
  and random pairs. It checks both buses and the whole enable chain.
- `decision_module_tb` tests N = 128 and N = 20. It uses a single set bit
  at every position of either bus, and random sparse patterns.
- `prefix_comparator_tb` runs the top at its default 128 bits. It checks
  every result, and checks that at most one bus bit is set. It also counts
  the behaviours of the design and fails if one never occurs: each of the
  three outcomes, a decision in every one of the 32 modules, an early
  abort that turns off all lower modules, and the worst case where every
  module is enabled.
- `comparator_widths_tb` runs 8-, 16-, 32-, 64- and 128-bit instances side
  by side. It applies the worst case (upper bits 0, only the LSB of one
  operand set) and an MSB difference that must turn off every lower module.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Irtl rtl/cmp_pkg.sv tb/prefix_comparator_tb.sv \
          -y rtl --top-module prefix_comparator_tb -Mdir obj
./obj/Vprefix_comparator_tb
```

Replace the testbench name to run any other. The package must come first
on the command line. `-y rtl` finds the other modules by file name. Every
test finishes in well under a second.

To change the width, set `N` on `prefix_comparator`. Any multiple of 4
works, and the decision tree adapts. Changing the module width means
changing `cmp_pkg::GROUP`. The five sets are written for any width, but
only 4 has been tested.
