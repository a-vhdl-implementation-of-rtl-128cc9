# A flexible 16-bit ALU with a sequential add-and-shift multiplier

This is an arithmetic and logical unit for two 16-bit operands. Five
selection lines choose one of 17 instructions: bitwise logic, one-bit shifts
and rotations, addition, subtraction, increment, decrement, comparison and
multiplication. The result is 32 bits wide, plus one carry/borrow bit.

The design is built for flexibility rather than speed. The arithmetic side
is assembled structurally from small units. A ripple-carry adder is made of
one-bit full adders. A subtractor is that adder with a complemented operand.
The multiplier is a clocked add-and-shift machine that reuses the same
adder. The logical side is plain dataflow. Only 17 of the 32 select codes
are used, so a new instruction means one new case arm and, at most, one new
unit. The width is a parameter (`WIDTH`, default 16) throughout.

## Instruction set

| `sel` | instruction | operands | `result` | `carry` |
|---|---|---|---|---|
| 00000 | NOT | inp1 | ~inp1 | 0 |
| 00001 | AND | inp1, inp2 | inp1 & inp2 | 0 |
| 00010 | OR | inp1, inp2 | inp1 \| inp2 | 0 |
| 00011 | NAND | inp1, inp2 | ~(inp1 & inp2) | 0 |
| 00100 | NOR | inp1, inp2 | ~(inp1 \| inp2) | 0 |
| 00101 | XOR | inp1, inp2 | inp1 ^ inp2 | 0 |
| 00110 | XNOR | inp1, inp2 | ~(inp1 ^ inp2) | 0 |
| 00111 | shift left | inp1 | inp1 << 1 | inp1[15] |
| 01000 | shift right | inp1 | inp1 >> 1 | inp1[0] |
| 01001 | rotate left | inp1 | inp1 rotated left by 1 | inp1[15] |
| 01010 | rotate right | inp1 | inp1 rotated right by 1 | inp1[0] |
| 01011 | add | inp1, inp2 | inp1 + inp2 | carry out |
| 01100 | subtract | inp1, inp2 | inp1 - inp2 | borrow (inp1 < inp2) |
| 01101 | increment | inp1 | inp1 + 1 | carry out |
| 01110 | decrement | inp1 | inp1 - 1 | borrow (inp1 == 0) |
| 01111 | multiply | inp1, inp2 | inp1 * inp2, 32 bits, sequential | 0 |
| 10000 | compare | inp1, inp2 | {29'b0, gt, eq, lt} | borrow (inp1 < inp2) |
| 10001-11111 | unused | | 0 | 0 |

All arithmetic is unsigned. 16-bit results are zero-extended to 32 bits.
The codes are in `alu_pkg::alu_op_e`.

## Organisation

```
alu16
├── logic_unit                 codes 00000-01010, dataflow
└── arith_unit                 codes 01011-10000
    ├── parallel_adder         add, increment
    │   └── full_adder x16
    ├── subtractor             subtract, decrement, compare
    │   └── parallel_adder
    └── multiplier             multiply
        ├── mult_control       state machine S0..S33
        └── mult_datapath      accumulator, multiplicand register
            └── parallel_adder
```

Both blocks see both operands at all times. Each block raises `valid` for
its own codes. `alu16` passes on the result and carry of whichever block
claims `sel`. There are no operand multiplexers in front of the blocks. The
only input selection sits inside `arith_unit`: increment drives the adder
with b = 0 and carry-in 1, and decrement drives the subtractor with b = 1.

**Adder.** `parallel_adder` is a ripple-carry chain of `full_adder` cells.
Cell i takes a[i], b[i] and c[i], and gives s[i] and c[i+1]. `cin` is c[0].
The carry ripples through all 16 cells in one combinational path.

**Subtractor.** `subtractor` computes a - b as a + ~b + 1. It is the same
adder, with the one's complement of b and a carry-in of 1. `borrow` is the
inverted carry out, so it is 1 exactly when a < b. Compare uses the same
difference: lt = borrow, eq = (difference == 0), gt = neither.

## The multiplier

Multiplication is the only sequential instruction. It uses the classic
add-and-shift algorithm:

- Examine one multiplier bit per step, least significant bit first.
- If the bit is 1, add the multiplicand to the upper half of an accumulator, then shift the accumulator right.
- If the bit is 0, only shift.

**Datapath** (`mult_datapath`). `ACC` has 2·WIDTH+1 bits (33 bits at the default):

```
 bit 2W      bits 2W-1 .. W          bits W-1 .. 0
 [ Cm ] [ partial product      ] [ remaining multiplier bits ]
                 ^                           |
                 +---- WIDTH-bit adder <-----+-- m = ACC(0) to the controller
                       + multiplicand register
```

- `load` clears the upper WIDTH+1 bits, puts the multiplier in the lower WIDTH bits and captures the multiplicand.
- `ad` writes {carry, sum} of (upper half + multiplicand) into ACC(2W:W). The extra top bit keeps the carry, called Cm.
- `sh` shifts all of ACC right by one, with 0 entering at the top. Cm moves into the partial product, and the next multiplier bit appears at ACC(0).

After WIDTH shifts, the multiplier bits are gone and ACC(2W-1:0) holds the product.

**Controller** (`mult_control`). It has 2·WIDTH+2 states. For WIDTH = 4 these are the ten states S0..S9 of the textbook form of this machine:

| state | condition | action | next |
|---|---|---|---|
| S0 | st = 0 | none | S0 |
| S0 | st = 1 | load | S1 |
| S(2k+1), testing bit k | m = 1 | ad | S(2k+2) |
| S(2k+1), testing bit k | m = 0 | sh | S(2k+3) |
| S(2k+2) | | sh | S(2k+3) |
| S(2W+1) | | done | S0 |

- The outputs are Mealy: they depend on the state and `m`, and take effect at the next clock edge.
- The state is a plain binary number, 6 bits at the default width.
- Assertions check two things: at most one of load/sh/ad/done is high, and the state stays in range.

**Timing.** `done` is high for one cycle, WIDTH + popcount(multiplier) + 1 cycles after the edge that takes `st`. At 16 bits this is 17 to 33 cycles. The product then stays in ACC until the next `load`. The operands are captured at `load` and may change afterwards.

## Top-level interface (`alu16`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock (used only by the multiplier) |
| rst_n | in | 1 | asynchronous active-low reset of the multiplier |
| inp1, inp2 | in | 16 | operands; inp1 is the multiplicand, inp2 the multiplier |
| sel | in | 5 | instruction select |
| start | in | 1 | starts a multiplication on a rising clock edge while `sel` = 01111 |
| result | out | 32 | result |
| carry | out | 1 | carry or borrow |
| done | out | 1 | one-cycle pulse: the product is on `result` |

All instructions except multiply are purely combinational from `inp1`, `inp2` and `sel` to `result` and `carry`. For multiply, `result` shows the product register for as long as `sel` stays 01111.

## Design choices beyond the original description

The instruction list, the codes, the pin widths, the full-adder ripple
adder, subtraction by complement addition, and the add-and-shift controller
and accumulator come from the original design. The following are this
implementation's own choices:

- The pins `clk`, `rst_n`, `start` and `done` were added. The original pin list names only the operands, the select, the result and the carry, but its multiplier is a clocked machine with start and done signals.
- The subtractor uses a carry-in of 1. The original describes subtraction as adding the one's complement, which alone would give a - b - 1.
- Shifts and rotations move by one bit, and shifts fill with 0. The bit that leaves goes on `carry`.
- Compare returns {gt, eq, lt} in the low three bits, unsigned, with the borrow on `carry`. The original does not define the comparison result.
- Increment and decrement reuse the adder and the subtractor with a constant operand.
- Unused codes return 0.
- The multiplier generalises the ten-state, 4-bit controller to 2·WIDTH+2 states.

**Not built:**

- Division is mentioned in passing in the original. It has no select code and no description, so there is no divider.
- The original shows simulation waveforms of a floating-point adder, subtractor and multiplier (sign, 8-bit exponent, 23-bit mantissa). These are not described beyond signal names, and no floating-point hardware is included.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
reference values computed independently in the testbench. Each ends with a
line `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_parallel_adder`, `tb_subtractor` | corner cases (full carry ripple, all ones, zero) and 2000 random operand pairs |
| `tb_logic_unit` | all 32 codes with corner and random operands, including `valid` |
| `tb_mult_control` (WIDTH = 4) | load/sh/ad/done every cycle against a reference stepping model with random `st` and `m`; the cycle count of a fixed run |
| `tb_mult_datapath` | ACC after single load/add/shift steps, including the carry bit, and full hand-sequenced products |
| `tb_multiplier` | products and exact latency for corner and 300 random pairs; that the product holds |
| `tb_multiplier4` | all 256 products at WIDTH = 4, their latencies, and that exactly ten states are visited |
| `tb_arith_unit` | add/sub/inc/dec/compare results and carries; multiplications through start/done |
| `tb_alu16` | end to end at the default size (see below) |

`tb_alu16` runs every select code with corner and random operands, and 103
multiplications, some with the operands changed mid-operation. It counts how
often each mechanism occurred and fails if any never did:

- each of the 17 instructions, and an unused code
- add carry out, subtract borrow, increment wrap, decrement borrow
- a bit shifted out on the carry
- all three comparison outcomes
- multiplier add steps and shift-only steps

Every testbench was also run against a deliberately broken copy of its
module, and each one failed.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/alu_pkg.sv tb/tb_alu16.sv \
          --top-module tb_alu16 -Mdir obj_alu16
./obj_alu16/Vtb_alu16
```

For another testbench, change the testbench file and top module. `-Irtl` lets
Verilator find each module by its file name; the package is listed first
because it is imported, not instantiated.
The simulator has two states, so every register is reset. `rst_n` must be
pulsed low before the first multiplication.

## Changing the design

- **Width:** set `WIDTH` on `alu16`. All units follow, and the result is 2·WIDTH bits. The multiplier then needs 2·WIDTH+2 states, and `$clog2` sizes its state register.
- **New instruction:** add a code to `alu_op_e`. Handle it in `logic_unit` or `arith_unit`, and include it in that block's `valid`. `alu16` needs no change.
- **Faster arithmetic:** the ripple adder is the critical path of all the combinational arithmetic. Replace the body of `parallel_adder` to speed up every unit at once, including each multiplier step.
