# execution_unit — a 32-bit single-cycle ALU with a built-in LFSR random-number generator

`execution_unit` is the execution stage of a small teaching microprocessor. Each clock
cycle it takes a 5-bit opcode and two 32-bit operands, `a` and `b`. In the same cycle it
returns a 32-bit `result` and four condition flags, `nzco`. It has 20 instructions:
bitwise logic, add and subtract, rotate and shifts, move, single-bit set and clear, and
two instructions for a pseudo-random number generator. The generator is a 32-bit linear
feedback shift register (LFSR), and it is the only storage in the design. The operands
and opcode are registered outside the block. Everything else is therefore combinational,
and synthesis must give exactly 32 flip-flops and no latches.

The interface, opcode values, flag meanings, reset style and generator structure are
those of the specification the design implements. Where that specification leaves a
point open, this design makes its own choice. All of those choices are listed in
"Departures and own choices" below.

## Interface

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1     | clock. All storage triggers on the rising edge. The target is 25 MHz. |
| `reset`  | in  | 1     | synchronous reset, active high. Only the generator is affected. |
| `opcode` | in  | 5     | instruction (table below) |
| `a`, `b` | in  | 32    | operands. They are held stable for a whole clock period. |
| `result` | out | 32    | instruction result, combinational |
| `nzco`   | out | 4     | flags `{N, Z, C, V}`, combinational |

## Instruction set

| opcode | mnemonic  | result | C | V |
|--------|-----------|--------|---|---|
| 00000  | NOP       | `a`. The flags are forced to `nzco = 0100`. | 0 | 0 |
| 00001  | OR        | `a \| b` | 0 | 0 |
| 00010  | XOR       | `a ^ b` | 0 | 0 |
| 00011  | NOR       | `~(a \| b)` | 0 | 0 |
| 00100  | AND       | `a & b` | 0 | 0 |
| 00101  | ADD       | `a + b` | carry-out | overflow |
| 00110  | SUBB      | `a - b` | carry-out of `a + ~b + 1` | overflow |
| 00111  | NOT       | `~b` | 0 | 0 |
| 01000  | ROR       | `a` rotated right by `b[2:0]` | 0 | 0 |
| 01001  | SLL       | `a << b[2:0]`. Zeros enter. | last bit out | 0 |
| 01010  | SLR       | `a >> b[2:0]`. Zeros enter. | last bit out | 0 |
| 01011  | SRA       | `a >>> b[2:0]`. Sign copies enter. | last bit out | 0 |
| 01111  | JUMP      | `a + b` | carry-out | overflow |
| 10010  | JUMPI     | `a + b` | carry-out | overflow |
| 10011  | LOAD      | `a + b` | carry-out | overflow |
| 11011  | MOVE      | `b` | 0 | 0 |
| 11100  | BITSET    | `a` with bit `b[4:0]` set to 1 | 0 | 0 |
| 11101  | BITCLEAR  | `a` with bit `b[4:0]` cleared to 0 | 0 | 0 |
| 11110  | RANDOMSET | `b`. The generator loads `b` at the next edge. | 0 | 0 |
| 11111  | RANDOMIZE | current generator value | 0 | 0 |
| other  | —         | behaves as NOP | 0 | 0 |

`N` is `result[31]`, the sign in two's complement. `Z` is `result == 0`. Both are
computed for every instruction except NOP, which forces them to 0 and 1.

## The flags, and where they are an interpretation

The specification fixes N, Z and V. It is less exact about the carry, and this is the
part of the design most open to another reading.

- **Which instructions produce C.** The carry exists so that "arithmetic and shift
  instructions can be chained". It is defined for arithmetic operations and for the
  logical and arithmetic shifts. This design therefore gives a carry for the five
  instructions that use the adder (ADD, SUBB, JUMP, JUMPI, LOAD) and for SLL, SLR and
  SRA. A rotation loses no bit, so ROR gives `C = 0`.
- **C after a subtraction.** This is the adder's carry-out of `a + ~b + 1`: 1 means no
  borrow, as on ARM. The x86-style borrow would be its inverse. This choice needs no
  logic beyond the shared adder.
- **C after a shift.** This is the last bit shifted out: `a[32-n]` for SLL, and `a[n-1]`
  for SLR and SRA, where `n = b[2:0]`. A shift by 0 gives `C = 0`.
- **V.** V is the usual two's-complement rule. It is set when both adder inputs (with
  `b` inverted for a subtraction) have the same sign and the sum's sign differs. JUMP,
  JUMPI and LOAD are address sums, but they are treated exactly like ADD.

## The pseudo-random generator (`lfsr`)

The generator is a Galois (internal-XOR) LFSR of 32 D flip-flops `q[0]`..`q[31]`. At
each rising edge:

```
q[0]  <= q[31]
q[i]  <= q[i-1] ^ q[31]   for i in {1, 5, 6, 31}   (TAPS)
q[i]  <= q[i-1]           otherwise
```

- **Tap positions.** The reference structure drawing shows these positions and elides
  the stages between them. This design assumes no taps in the elided stretches. With
  only these four taps the feedback polynomial `x^32 + x^31 + x^6 + x^5 + x + 1` is not
  primitive, so the sequence is shorter than 2^32 - 1. The `TAPS` parameter is a
  32-bit mask, and a maximum-length tap set can replace it without touching the code.
- **Stepping.** The register has no enable, so it advances on every clock edge. This
  follows the reference drawing, in which the clock goes straight to every flip-flop.
  Two things stop the step: a reset loads `SEED`, and a RANDOMSET loads `b`. Reset has
  priority over the load.
- **SEED.** This is `32'h0000_0001`, chosen so that the register never starts in the
  all-zero state, which an XOR LFSR cannot leave. A RANDOMSET with `b = 0` still loads
  zero, as the instruction asks.
- **Timing seen from the instruction stream.** A RANDOMSET in cycle *t* makes a
  RANDOMIZE in cycle *t+1* return `b`. A RANDOMIZE in cycle *t+2* returns `b` advanced
  by one step, and so on. Any instruction in between still advances the generator.

## Structure

```
execution_unit
 ├─ add_sub     one 32-bit adder/subtracter shared by ADD, SUBB, JUMP, JUMPI, LOAD
 ├─ shift_unit  barrel rotate/shift by 0..7, with the carry of the shifts
 └─ lfsr        the 32-bit generator register (the only flip-flops)
```

The logic operations, MOVE, BITSET/BITCLEAR, the result mux and the flags are written in
`execution_unit` itself. The specification asks for minimum area in the arithmetic, so a
single adder with an inverted `b` and a carry-in does both addition and subtraction.
The opcodes of the four shifts, `010xx`, carry the shift type in their two low bits,
which drive `shift_unit` directly. `alu_pkg` holds the opcode enum (`opcode_e`), the
shift-type enum and the `nzco_t` flag struct.

| file | contents |
|------|----------|
| `rtl/alu_pkg.sv` | widths, `opcode_e`, `shift_op_e`, `nzco_t` |
| `rtl/execution_unit.sv` | top: decode, logic ops, result mux, flags |
| `rtl/add_sub.sv` | adder/subtracter, carry, overflow |
| `rtl/shift_unit.sv` | ROR / SLL / SLR / SRA |
| `rtl/lfsr.sv` | generator, parameters `WIDTH`, `TAPS`, `SEED` |

## Timing

Every instruction completes in the cycle in which it is presented. The critical path
runs from the operand inputs through the 32-bit adder, the result mux and the 32-bit
zero detect to `nzco[2]`. The design targets 25 MHz, a 40 ns period. No timing has been
verified here, because the result depends on the device and on synthesis.

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=<n> failures=<n>` and
has a watchdog.

- `tb/tb_execution_unit.sv`: end to end at the default parameters. It uses a 40 ns
  clock, and the inputs change 2 ns after each rising edge. Outputs are checked in the
  same cycle, 36 ns later. The reference model is written independently from the
  instruction table and includes its own copy of the generator. The run uses about
  6,000 instructions, mostly random, with biased operands so that zero results and
  overflows occur. It mixes in unassigned opcodes, RANDOMSET/RANDOMIZE pairs and
  occasional resets. It also counts, and requires at least once, each of these events:
  every opcode, an adder carry, a shift carry, an overflow, a zero result, a negative
  result, RANDOMIZE straight after RANDOMSET, a reset, and a generator step.
- `tb/tb_lfsr.sv`: checks the generator against a bit-by-bit model of the tap
  positions. It covers reset, load, reset over load and the exact one-step pattern
  `8000_0000 -> 8000_0063`.
- `tb/tb_add_sub.sv`: compares the adder/subtracter with 64-bit integer arithmetic,
  on directed corner cases and 2,000 random vectors.
- `tb/tb_shift_unit.sv`: compares the shifter with a one-bit-at-a-time loop, for all
  four operations and all eight shift amounts.

Each testbench was also run against a deliberately broken copy of its module, and each
one failed. The broken copies were:

- a missing tap;
- a wrong overflow rule;
- SRA filling with zeros;
- BITSET/BITCLEAR taking the bit position from `b[2:0]`.

Synthesis of the top (yosys, coarse) gives 32 flip-flop bits and no latches.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_execution_unit \
    rtl/alu_pkg.sv rtl/add_sub.sv rtl/shift_unit.sv rtl/lfsr.sv rtl/execution_unit.sv \
    tb/tb_execution_unit.sv
./obj_dir/Vtb_execution_unit
```

For a unit testbench, replace the testbench file and `--top-module`. `alu_pkg.sv`
must come first.

## Departures and own choices

The specification does not settle the following points. This design resolves each as
shown.

- C after SUBB is the carry-out (1 = no borrow).
- ROR gives `C = 0`.
- The carry of a shift is the last bit out, and 0 for a shift by 0.
- JUMP, JUMPI and LOAD set C and V like ADD.
- RANDOMSET returns `b` as its result.
- Opcodes not in the table behave as NOP.
- The generator resets to `SEED = 1`.
- The generator steps on every edge.
- The generator has taps only at the positions drawn.

The specification itself was written for a VHDL entity of the same name and ports.
This SystemVerilog keeps those names.
