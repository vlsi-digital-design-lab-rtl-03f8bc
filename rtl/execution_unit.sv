// execution_unit: 32-bit single-cycle ALU with a built-in pseudo-random number generator.
//
// Every instruction completes in the clock cycle in which it is presented: the
// operands a, b and the opcode are registered outside this block and held stable
// for one period, and result and nzco follow them combinationally. The only
// storage is the 32-bit LFSR (lfsr), so synthesis yields exactly 32 flip-flops
// and no latches. The instruction set, opcode values, port names, flag meanings
// and the synchronous active-high reset are those of the specification.
//
// Datapath:
//   - one shared adder/subtracter (add_sub) serves ADD, SUBB, JUMP, JUMPI, LOAD;
//   - shift_unit serves ROR, SLL, SLR, SRA with the shift amount b[2:0];
//   - bitwise logic (OR, XOR, NOR, AND, NOT of b), MOVE, BITSET/BITCLEAR (bit b[4:0]
//     of a forced to 1/0) are written here;
//   - RANDOMSET loads b into the LFSR at the next rising edge; RANDOMIZE returns
//     the LFSR's current value. The LFSR otherwise steps on every clock edge.
//
// Flags nzco = {N, Z, C, V}: N is result[31] and Z is (result == 0) for every
// instruction; C is produced only by the arithmetic instructions and by the
// three shifts SLL, SLR, SRA, V only by the arithmetic instructions, and both are
// 0 otherwise. NOP returns a with nzco forced to 0100, as specified.
// This design's own choices: C after a subtraction is the adder's carry-out
// (1 = no borrow); C after a shift is the last bit shifted out; a rotation sets no
// carry; RANDOMSET returns b as its result; opcodes missing from the instruction
// set behave as NOP.
`timescale 1ns/1ps
module execution_unit
  import alu_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic [OPCODE_W-1:0] opcode,
  input  logic [DATA_W-1:0]   a,
  input  logic [DATA_W-1:0]   b,
  output logic [DATA_W-1:0]   result,
  output logic [3:0]          nzco
);

  opcode_e op;
  assign op = opcode_e'(opcode);

  // ---------------------------------------------------------------- arithmetic
  logic              is_sub;
  logic [DATA_W-1:0] sum;
  logic              sum_c, sum_v;

  assign is_sub = (op == OP_SUBB);

  add_sub #(.WIDTH(DATA_W)) u_add_sub (
    .a       (a),
    .b       (b),
    .sub     (is_sub),
    .sum     (sum),
    .carry   (sum_c),
    .overflow(sum_v)
  );

  // ---------------------------------------------------------------- shifts
  shift_op_e         sh_op;
  logic [DATA_W-1:0] sh_y;
  logic              sh_c;

  // The two low opcode bits of ROR/SLL/SLR/SRA (01000..01011) select the shift
  assign sh_op = shift_op_e'(opcode[1:0]);

  shift_unit #(.WIDTH(DATA_W), .AMT_W(3)) u_shift_unit (
    .a    (a),
    .amt  (b[2:0]),
    .op   (sh_op),
    .y    (sh_y),
    .carry(sh_c)
  );

  // ---------------------------------------------------------------- random
  logic [DATA_W-1:0] rnd;

  lfsr #(.WIDTH(DATA_W)) u_lfsr (
    .clk       (clk),
    .reset     (reset),
    .load      (op == OP_RANDOMSET),
    .load_value(b),
    .q         (rnd)
  );

  // ---------------------------------------------------------------- result mux
  logic [DATA_W-1:0] bit_mask;
  nzco_t             flags;

  assign bit_mask = DATA_W'(1) << b[4:0];

  always_comb begin
    result  = a;
    flags   = '{n: 1'b0, z: 1'b0, c: 1'b0, v: 1'b0};
    unique case (op)
      OP_OR:        result = a | b;
      OP_XOR:       result = a ^ b;
      OP_NOR:       result = ~(a | b);
      OP_AND:       result = a & b;
      OP_NOT:       result = ~b;
      OP_ADD, OP_SUBB, OP_JUMP, OP_JUMPI, OP_LOAD: begin
        result  = sum;
        flags.c = sum_c;
        flags.v = sum_v;
      end
      OP_ROR:       result = sh_y;
      OP_SLL, OP_SLR, OP_SRA: begin
        result  = sh_y;
        flags.c = sh_c;
      end
      OP_MOVE:      result = b;
      OP_BITSET:    result = a | bit_mask;
      OP_BITCLEAR:  result = a & ~bit_mask;
      OP_RANDOMSET: result = b;
      OP_RANDOMIZE: result = rnd;
      default:      result = a;   // NOP and the unassigned opcodes
    endcase

    flags.n = result[DATA_W-1];
    flags.z = (result == '0);

    // NOP and unassigned opcodes: result = a, flags forced to N=0 Z=1 C=0 V=0
    if (!(op inside {OP_OR, OP_XOR, OP_NOR, OP_AND, OP_ADD, OP_SUBB, OP_NOT,
                     OP_ROR, OP_SLL, OP_SLR, OP_SRA, OP_JUMP, OP_JUMPI, OP_LOAD,
                     OP_MOVE, OP_BITSET, OP_BITCLEAR, OP_RANDOMSET, OP_RANDOMIZE}))
      flags = '{n: 1'b0, z: 1'b1, c: 1'b0, v: 1'b0};
  end

  assign nzco = flags;

endmodule
