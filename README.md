# 16-bit clock-gated ALU

A 16-bit ALU split into two independent units, an arithmetic unit and a logic
unit, each holding its operands in its own registers. Most of the time only
one unit has work to do, so the master clock is routed to the unit that the
current operation needs and withheld from the other. A unit whose clock stands
still does not toggle its registers or the logic behind them, which is where
the dynamic power saving comes from. The adder inside the arithmetic unit is a
variable block length carry skip adder.

The design is small (about 100 flip-flops and 150 word-level cells after
generic synthesis) and fully synthesizable. The interesting parts are the clock
gating and the sequencing around it; the arithmetic is simple.

## Structure

```
             a, b (16)          s2 s1 s0 cin   enable
                |                    |            |
                |             +------+------------+------+
                |             |  alu_control             |
                |             |  captures {s2,s1,s0,cin} |
                |             |  IDLE -> LOAD -> WRITE   |
                |             +--+------+--------+-------+
                |        gate_s2 |      | gate_en | load, wr, op_q, done
                |             +--+------+--+     |
   clk ---------)------------>| clock_gating|     |
                |             +--+--------+-+    |
                |          clk_lu|        |clk_au|
        +-------+---------+      |        |      |
        |                 |      |        |      |
  +-----v------+   +------v------v+       |      |
  | logic_unit |<--+  (clk_lu)    |       |      |
  | regs + op  |                  |       |      |
  +-----+------+   +--------------v-------+-+    |
        |          | arithmetic_unit         |   |
        |          | regs + carry_skip_adder |   |
        |          +-----------+-------------+   |
        | y_lu                 | y_au, cout_au   |
      +-v----------------------v--+              |
      | output_mux_reg            |<-------------+
      | mux on s2, register on    |
      | clk_lu | clk_au           |
      +-------------+-------------+
                    | y, cout
```

| Module | Role |
|---|---|
| `lp_alu16` | top level, wires everything together |
| `alu_control` | Enable pulse detection, operation capture, LOAD/WRITE sequencing, `done` |
| `clock_gating` | derives `clk_lu` and `clk_au` from `clk` |
| `arithmetic_unit` | operand registers on `clk_au`, operand selector, adder |
| `carry_skip_adder` | 16-bit adder, seven ripple blocks with skip paths |
| `rca_block` | W-bit ripple carry adder (one block) |
| `carry_skip_logic` | propagate bit and carry bypass of one block |
| `logic_unit` | operand registers on `clk_lu`, AND/XOR/OR/NOT |
| `output_mux_reg` | result multiplexer and output register |
| `alu_pkg` | width, adder block widths, `alu_op_t`, `unit_e` |

## Operations

`s2` chooses the unit: 0 is the logic unit, 1 the arithmetic unit.

Logic unit (`s2 = 0`, `cin` ignored):

| s1 | s0 | y |
|---|---|---|
| 0 | 0 | A AND B |
| 0 | 1 | A XOR B |
| 1 | 0 | A OR B |
| 1 | 1 | NOT B |

Arithmetic unit (`s2 = 1`). Note the column order: here **`s0` is the upper
select bit**. The unit always computes A + Y + cin, and the select bits only
choose Y:

| s0 | s1 | Y | cin = 0 | cin = 1 |
|---|---|---|---|---|
| 0 | 0 | B | A + B | A + B + 1 |
| 0 | 1 | NOT B | A + NOT B | A − B |
| 1 | 0 | 0 | A | A + 1 |
| 1 | 1 | all ones | A − 1 | A |

`cout` is the adder's carry out in every arithmetic row, so after A − B it is
1 when there is no borrow. After a logic operation `cout` reads 0.

The select order of the arithmetic table is ambiguous in the original
description of this ALU: the table's header lists the columns as S0, S1, Cin,
while its caption names them s1, s0, carry in. This implementation follows the
header. If your encoding should be the other way round, swap the two middle
cases of the `case ({s0_q, s1_q})` in `arithmetic_unit.sv`.

## Running an operation

The pins are sampled, not registered on a free clock: hold `a`, `b`, `s2`,
`s1`, `s0` and `cin`, then give `enable` a high-then-low pulse. The
controller keeps a registered copy of `enable`; a rising edge of `clk` that
sees `enable` low after the previous edge saw it high is the *start edge*.

| rising edge | state after it | what happens at this edge |
|---|---|---|
| E0 (sees `enable` low, previous saw high) | LOAD | `{s2,s1,s0,cin}` captured in `op_q`; `done` falls |
| E1 | WRITE | the selected unit's gated clock ticks; its registers load `a`, `b` and the select bits |
| E2 | IDLE | the same gated clock ticks again; the output register takes the selected result; `done` rises |

So the result and `done` appear at the third rising edge, counting the start
edge as the first. `a` and `b` must be valid at E1; the operation bits at E0.
After E0 the operation pins are free; after E1 the operand pins are free too.
`y`, `cout` and `done` then hold until the next operation is written.

A new pulse can overlap the end of the current operation: if `enable` is high
at E1 and low at E2, E2 both writes the current result and starts the next
operation (`done` stays low). Two starts can never fall on adjacent edges,
because each needs `enable` high at one edge and low at the next.

`rst` is asynchronous and active high. It clears every register in the
design, including the output register and the gating enables, at any time.

## Clock gating

`clock_gating` ANDs the master clock with two enables:

- `clk_lu = clk & en_lu_q`, where `en_lu_q` was captured as `en & ~s2`;
- `clk_au = clk & en_au_q`, where `en_au_q` was captured as `en & s2`.

`s2` here is the captured `op_q.s2`, and `en` (`gate_en` of the controller) is
high in the LOAD and WRITE states. Each unit therefore receives exactly two
clock edges per operation it executes, the other unit none, and while the ALU
is idle neither unit is clocked at all.

The enables are sampled by flip-flops on the **falling** edge of `clk`. They
can thus only change while `clk` is low, and the AND gate output can never
produce a short pulse when the enable changes mid-cycle. In the basic scheme
the clock is ANDed with `s2` directly, which is glitch-free only if `s2` never
changes while the clock is high. The falling-edge flops, and the idle
qualifier `en`, are additions of this implementation. On an FPGA or in an ASIC
flow you would normally replace the flop + AND pair with the vendor's
clock-gating cell or clock-buffer enable.

The output register sits on `clk_lu | clk_au`: whichever unit clock runs also
clocks the output register. Since the unit clock ticks at both E1 and E2,
the register has a write enable (`wr`, high only in WRITE) so that E1 does
not overwrite the previous result.

All gated flip-flops sample on the same rising edge as the master-clock
flip-flops. The gated clocks are a single AND gate away from `clk`, which
simulators treat as the same edge. In a physical implementation, balance the
skew between `clk` and the gated clocks as for any gated clock tree.

## Carry skip adder

The 16 bits are cut into seven ripple carry blocks of unequal length, short at
both ends and longest in the middle:

| block | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| bits | 0 | 2..1 | 5..3 | 9..6 | 12..10 | 14..13 | 15 |
| width | 1 | 2 | 3 | 4 | 3 | 2 | 1 |

Each block adds its bits as a ripple chain (`rca_block`). Beside it,
`carry_skip_logic` forms the block propagate bit, p = AND over the block of
(a_i XOR b_i). When p = 1, every bit of the block would pass an incoming carry
straight on, so the block's carry out is simply its carry in. This is selected
by a 2:1 multiplexer and does not wait for the ripple chain. Otherwise the
ripple chain's own carry out is used. The multiplexer output of block k is the
carry into block k+1, and that of block 6 is `cout`.

The result is functionally identical to any other 16-bit adder, so
testbenches compare it against `a + b + cin`. The block widths are the
`alu_pkg::CSA_BW` array (or the `BW` parameter of `carry_skip_adder`); an
elaboration-time check stops a list that does not add up to the width.

Note that the skip path helps the worst-case delay only in a timing-driven
implementation that keeps the multiplexers. Generic synthesis may flatten the
structure into its own adder. The original FPGA implementation reported a
carry-in to carry-out path of about 22 ns, close to that of a plain ripple
adder.

## Ports of `lp_alu16`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | master clock |
| `rst` | in | 1 | asynchronous reset, active high |
| `enable` | in | 1 | high then low starts one operation |
| `s2` | in | 1 | 0 logic unit, 1 arithmetic unit |
| `s1`, `s0` | in | 1 each | operation select (see tables) |
| `cin` | in | 1 | carry in of the arithmetic unit |
| `a`, `b` | in | 16 each | operands |
| `y` | out | 16 | registered result |
| `cout` | out | 1 | registered carry (0 after logic operations) |
| `done` | out | 1 | result of the last started operation is in `y` |

The only parameter is `WIDTH` (default 16). The adder's block list must be
changed to match if you change it.

## How this relates to the original description

The following follow the original description of this ALU: the two units
with operand registers on their own gated clocks, both operation tables, the
S2-controlled AND gating of the clock (S2 = 0 logic unit, S2 = 1 arithmetic
unit), the output multiplexer and output register clocked by either gated
clock, the Enable high-then-low rule, the reset-to-zero behaviour, and the
carry skip adder's block layout and propagate rule.

These are choices of this implementation:

- the three-state controller, the exact cycle timing, `done`, and the
  overlap of a new start with the write cycle;
- the falling-edge enable flops and the idle qualifier in the clock gating;
- the write enable on the output register, and the registered carry output;
- the multiplexer form of the skip logic;
- reading S0 as the upper select bit of the arithmetic table (see above).

Known differences:

- The original top-level block diagram lists a larger menu of operations:
  NAND, NOR, XNOR, A·B, B − A, two's complement of A and right shift of A,
  beside those in the tables. No encoding for them is given, and the
  three select bits plus carry in only reach the twelve tabulated
  operations. Only the tabulated operations are built.
- One sentence of the original text says that S2 = 0 clocks the arithmetic
  unit. The gating schematic, the unit activation table and the output
  multiplexer description all say the opposite, and those are followed.
- The original Spartan-3E implementation reports 54 bonded IOBs. This top has
  57 pins: 48 data bits and 9 single-bit signals (`clk`, `rst`, `enable`,
  `s2`, `s1`, `s0`, `cin`, `cout`, `done`). The reported maximum frequency
  (65.19 MHz), LUT count (107), slice count (94) and power saving (about
  two thirds of the ALU's dynamic power) are results of that FPGA flow and are
  not reproduced here.

## Testbenches

Every module has a self-checking testbench in `tb/`, named `<module>_tb`.
Each prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each also
has a watchdog that records a failure if the run hangs.

| testbench | what it checks |
|---|---|
| `rca_block_tb` | all inputs at widths 1 to 4 against integer addition |
| `carry_skip_logic_tb` | all inputs; propagate rule and bypass; carry equals the arithmetic carry |
| `carry_skip_adder_tb` | corner cases plus 200 000 random vectors; counts carries that take a skip path |
| `arithmetic_unit_tb` | all eight table rows on random operands, hold without `load`, reset |
| `logic_unit_tb` | all four operations, hold without `load`, reset |
| `clock_gating_tb` | cycle-by-cycle gated clock levels, no glitch on mid-cycle changes, edge counts, reset |
| `output_mux_reg_tb` | selection, write enable, either clock writes, reset |
| `alu_control_tb` | exact LOAD/WRITE/done sequence, Enable held high, back-to-back start, reset mid-operation |
| `lp_alu16_tb` | 20 000 operations end to end at the default size |

`lp_alu16_tb` runs at the default parameters. It checks each result and its
three-edge latency, and counts the gated clock edges each unit receives. It
requires every one of the twelve operations, a unit switch, a carry
taking a skip path, a back-to-back start, a mid-operation reset and idle
cycles (during which no gated edge may occur) each to happen at least once.

Run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/alu_pkg.sv tb/lp_alu16_tb.sv --top-module lp_alu16_tb -o sim
./obj_dir/sim +verilator+rand+reset+2
```

The testbenches pulse `rst` after time zero, because an asynchronous reset
needs an edge. They also drive inputs away from the rising clock edge. Lint
a module with `verilator --lint-only -Wall -Irtl -y rtl rtl/alu_pkg.sv
rtl/<module>.sv`. The remaining lint warnings are stylistic: an unused
package constant, the propagate output of the skip stage left open inside the
adder, and `rst` also used by an assertion's `disable iff`.
