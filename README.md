# calc5 — a serial calculator that keeps its idle unit quiet

calc5 is a small 8-bit calculator. All of its input arrives as one word stream and
all of its output leaves as another. Each clock it takes one word: an opcode, then a
left operand, then a right operand. It answers with a sum or a product on an output
port of the same width.

The main idea is about power. In a simpler arrangement, both the adder and the
multiplier share one pair of input registers, so both units compute on every word
that goes past. Worse, the left input register is updated while the right input
still holds the previous operation's value, so the units compute meaningless
intermediate results. calc5 avoids both problems in two ways:

* Each arithmetic unit has its own pair of operand registers (`add1`/`add2` for the
  adder, `mult1`/`mult2` for the multiplier). Only the pair of the unit the opcode
  selects is loaded. The other unit's inputs stay still, so it does not switch.
* A `temp_reg` parks the left operand for one cycle. When the right operand arrives,
  both operands are written into the selected unit's registers on the same edge. A
  unit therefore never sees a new left operand paired with an old right one.

On top of this, the registers can be clock-gated. A register group that does not
load in a cycle then receives no clock edge at all.

The cost is area: five 8-bit operand registers instead of two. Without clock
gating, the extra flip-flops can use more power than they save in a
multiply-heavy stream. With clock gating, the gated design is the better one for
every kind of stream.

## Word stream and timing

This is the part to understand before using the block. The calculator has no input
handshake: `req` is tied high, and a word must be on `data_in` at every rising edge.
Words are signed two's complement.

Each operation takes exactly three words:

| word | content |
|------|---------|
| 1 | opcode, in the low 4 bits (the upper bits are ignored) |
| 2 | left operand |
| 3 | right operand |

The opcodes are:

| opcode | operation | result |
|--------|-----------|--------|
| `0000` | null | 0 |
| `0001` | add | `left + right`, 8 bits, wraps on overflow (`-105 + -64 = 87`) |
| `0010` | multiply | 16-bit signed product, sent as two words, high word first |
| other | treated as null | 0 |

Operations follow each other with no gap. Every opcode takes three clocks, so the
throughput is one operation per three clocks. Let R be the cycle in which an
operation's right operand is on `data_in`:

* **add / null / undefined**: in cycle R+2, `data_out` holds the result and `ready`
  is 1.
* **multiply**: in cycle R+2, `data_out` holds the high byte; in cycle R+3 it holds
  the low byte. `ready` is 1 in both cycles.

Cycle R+1 is when the next opcode is read, so a result overlaps the next
operation's input. A product's high byte comes out while the next left operand
goes in, and its low byte while the next right operand goes in. Example
(`-105 * -64 = 6720 = 0x1A40`):

```
cycle      0     1      2     3     4     5     6
data_in    2   -105   -64     2    10   -26     ...
state     INIT LEFT1 RIGHT  RDY2  LEFT2 RIGHT  RDY2
data_out   0     0      0     0    26    64    64
ready      0     0      0     0     1     1     0
```

When `ready` is 0, `data_out` keeps showing the low byte of the last result. After
reset it shows 0.

## Control state machine (`calc5_fsm`)

The FSM has six states:

```
READ_OPC_INIT -> READ_LEFT1 -> READ_RIGHT -+-> READ_OPC_READY1 -> READ_LEFT1 -> ...
                                 ^         |   (opcode is not multiply)
                                 |         +-> READ_OPC_READY2 -> READ_LEFT2
                                 +-------------------------------------+
```

* `READ_OPC_INIT` reads the first opcode after reset. There is no result yet.
* `READ_OPC_READY1` and `READ_OPC_READY2` read the next opcode. In the same cycle
  they capture the finished result.
  * READY2 follows a multiply. Its next state is `READ_LEFT2`, which puts the high
    byte on `data_out`.
  * READY1 follows every other operation.
* `READ_LEFT1` and `READ_LEFT2` load `temp_reg`, but only for add and multiply.
  Null and undefined opcodes leave every operand register alone.
* `READ_RIGHT` loads `temp_reg` and `data_in` into the selected unit's pair.

`ready` is a register. It is set in the cycle after `READ_LEFT2`, `READ_OPC_READY1`
or `READ_OPC_READY2`. The FSM decodes its state and the opcode into single-cycle
load strobes for the datapath: `opcode_load`, `temp_load`, `add_load`, `mul_load`,
`result_load` and `out_high`. An assertion checks that the two units are never
loaded in the same cycle.

## Datapath

* `opcode_reg` (4 bits, in `calc5`) is loaded in the three opcode states.
* `calc5_operand_regs` holds `temp_reg` and the two operand pairs.
* `calc5_adder` is a signed 8-bit adder that drops the carry.
* `calc5_multiplier` is a signed 8×8→16 multiplier. It is combinational and has no
  pipeline: its output is captured one cycle after its operands are loaded.
* `calc5_result` contains three parts:
  * a multiplexer, selected by opcode, whose inputs are the product, the sum
    (zero-extended, not sign-extended, into 16 bits) and zero;
  * the 16-bit `result_reg`;
  * the output multiplexer, which picks the high byte in `READ_LEFT2` and the low
    byte otherwise.

The adder and multiplier are written as plain `+` and `*`, and their structure is
left to synthesis.

## Clock gating (`clock_gate`, parameter `CLOCK_GATING`)

`CLOCK_GATING = 1` is the default. It gives each of these register groups its own
gate, enabled by the group's load strobe:

* `temp_reg`
* the adder pair
* the multiplier pair
* `result_reg`

`opcode_reg` and the FSM run on the free clock.

The gate is the usual latch-and-AND cell:

* A latch is transparent while `clk` is low and captures the enable.
* The gated clock is `clk & latched_enable`. It cannot glitch while `clk` is high.

Synthesis reports these latches (one bit per gate), and they are intended. In a
real flow you would replace `clock_gate` with the library's integrated clock-gate
cell. `CLOCK_GATING = 0` turns every gate into a wire. The load strobes still act
as ordinary enables, and the behaviour is identical cycle for cycle.

Using explicit gate cells is a choice of this RTL. The alternative is to write
enables only and let a power-aware synthesis tool insert the gates. If you prefer
that, build with `CLOCK_GATING = 0`, and the tool will find the same enables.

## Reset

`reset` is asynchronous and active high. It clears every register, puts the FSM in
`READ_OPC_INIT` and drives `ready` low. Because the gated registers are reset
asynchronously, reset works without a clock edge reaching them.

Raise `reset` with an edge: a simulator that starts with `reset` already high
produces no `posedge`. Then release it. The first word after release is an opcode.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `WORD_LENGTH` (`calc5`), `WIDTH` (sub-blocks) | 8 | word width; the product is `2*WIDTH` |
| `CLOCK_GATING` | 1 | explicit clock gates on/off |

The opcode is always 4 bits (`calc5_pkg::OPCODE_W`), so there is room for 16
operations. Only three are defined; a new one needs a new result case in
`calc5_result`. If the new operation uses its own unit, it also needs its own
operand pair and a load strobe in the FSM.

## Files

| file | content |
|------|---------|
| `rtl/calc5_pkg.sv` | opcode constants, state enum |
| `rtl/calc5.sv` | top level, `opcode_reg`, wiring |
| `rtl/calc5_fsm.sv` | control FSM and strobe decode |
| `rtl/calc5_operand_regs.sv` | `temp_reg`, adder and multiplier operand registers |
| `rtl/calc5_adder.sv`, `rtl/calc5_multiplier.sv` | arithmetic units |
| `rtl/calc5_result.sv` | result multiplexer, `result_reg`, output multiplexer |
| `rtl/clock_gate.sv` | latch-based clock gate |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`:

* **`tb_calc5`**: the top at its default parameters. It runs four streams of 400
  operations each, with a reset before each:
  * add only;
  * multiply only;
  * a mix of null, add, multiply and undefined opcodes;
  * null only.

  It compares `data_out` and `ready` every cycle against a cycle-exact model built
  from the timing rules above. The add and multiply streams start with seven
  operations whose results were worked out by hand. The test also checks that the
  unused unit's operand registers hold, and that the gated clocks of each unit
  really stop. It fails if any of these never happens: add, multiply, null,
  undefined opcode, two-word output, clock gating of either unit, or reset.
* **`tb_calc5_ungated`**: the same test with `CLOCK_GATING = 0`.
* **`tb_calc5_fsm`**: compares the FSM's state, strobes and `ready` with the
  position in the word stream. It uses random opcodes and resets in the middle of
  the run.
* **`tb_calc5_operand_regs`** and **`tb_calc5_result`**: check the gated and the
  ungated builds side by side against register models.
* **`tb_calc5_adder`** and **`tb_calc5_multiplier`**: exhaustive over all
  65,536 operand pairs.
* **`tb_clock_gate`**: checks that `gclk` follows `clk` only in enabled cycles and
  ignores changes of the enable while `clk` is high.

To run one with Verilator 5:

```
verilator --binary --timing --assert rtl/calc5_pkg.sv rtl/*.sv tb/tb_calc5.sv --top-module tb_calc5
./obj_dir/Vtb_calc5
```

Every test finishes in well under a second.

## Where this RTL goes beyond the original design, and what it leaves out

* **Clock gates**: the original design is reported with and without clock gating,
  but the gating itself is not described. The explicit gate cells, and which
  registers they cover, are choices made here (see above).
* **Missing results**: power, area and slack figures come from a specific
  standard-cell flow at a 5 ns clock, and nothing here reproduces them. Reported
  for reference: with gating, total power fell roughly 26–66% against the
  shared-register version, at an area increase of about 19% and a slack of about
  1.7 ns. Those numbers belong to that flow, not to this RTL.
* **Original test vectors**: the original input files are not available. The
  testbenches generate equivalent random streams instead. The first operations of
  the add and multiply streams match values known from the original simulations.
* **Shared-register baseline**: the earlier version, which uses shared input
  registers, is not included.
