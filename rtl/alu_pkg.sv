// alu_pkg: shared constants and the opcode encoding of the 32-bit execution unit.
//
// The opcode values and mnemonics are those of the instruction set table of the
// specification. Codes not in the table (01100-01110, 10000, 10001, 10100-11010)
// are not given a name here; the execution unit treats them like NOP, which is
// this design's own choice. The nzco bit order (N=3, Z=2, C=1, V=0) of the flag
// struct follows the specification.
`timescale 1ns/1ps
package alu_pkg;

  localparam int unsigned DATA_W   = 32;  // operand and result width
  localparam int unsigned OPCODE_W = 5;   // opcode width

  typedef enum logic [OPCODE_W-1:0] {
    OP_NOP       = 5'b00000,
    OP_OR        = 5'b00001,
    OP_XOR       = 5'b00010,
    OP_NOR       = 5'b00011,
    OP_AND       = 5'b00100,
    OP_ADD       = 5'b00101,
    OP_SUBB      = 5'b00110,
    OP_NOT       = 5'b00111,
    OP_ROR       = 5'b01000,
    OP_SLL       = 5'b01001,
    OP_SLR       = 5'b01010,
    OP_SRA       = 5'b01011,
    OP_JUMP      = 5'b01111,
    OP_JUMPI     = 5'b10010,
    OP_LOAD      = 5'b10011,
    OP_MOVE      = 5'b11011,
    OP_BITSET    = 5'b11100,
    OP_BITCLEAR  = 5'b11101,
    OP_RANDOMSET = 5'b11110,
    OP_RANDOMIZE = 5'b11111
  } opcode_e;

  // Shift-unit operation select
  typedef enum logic [1:0] {
    SH_ROR = 2'b00,
    SH_SLL = 2'b01,
    SH_SLR = 2'b10,
    SH_SRA = 2'b11
  } shift_op_e;

  // Flags; packs to the nzco vector in the specified bit order {N, Z, C, V}
  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } nzco_t;

endpackage
