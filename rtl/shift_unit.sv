// shift_unit: rotate and shift instructions of the execution unit.
//
// Moves operand a by amt positions (0 to 2**AMT_W-1; the specification uses the
// three low bits of b, so 0 to 7):
//   SH_ROR  rotate right, bits leaving at the bottom re-enter at the top
//   SH_SLL  shift left, zeros enter at the bottom
//   SH_SLR  shift right, zeros enter at the top
//   SH_SRA  shift right, copies of a's sign bit enter at the top
// The operations come from the specification. The carry output is this design's
// reading of the carry flag for shifts: it is the last bit shifted out (a[WIDTH-amt]
// for a left shift, a[amt-1] for a right shift), and 0 for a shift by zero and
// for a rotation, which loses no bit. Purely combinational.
`timescale 1ns/1ps
module shift_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned AMT_W = 3
) (
  input  logic [WIDTH-1:0] a,
  input  logic [AMT_W-1:0] amt,
  input  shift_op_e        op,
  output logic [WIDTH-1:0] y,
  output logic             carry
);

  // Double-width views: the upper/lower half catches the bits shifted out
  logic [2*WIDTH-1:0] left_ext;   // {a, 0} shifted left: upper half is the result
  logic [2*WIDTH-1:0] right_ext;  // {fill, a, 0} shifted right
  logic [WIDTH-1:0]   fill;

  always_comb begin
    fill      = (op == SH_SRA) ? {WIDTH{a[WIDTH-1]}} : '0;
    left_ext  = {{WIDTH{1'b0}}, a} << amt;
    right_ext = {a, {WIDTH{1'b0}}} >> amt;
    right_ext = right_ext | ({fill, {WIDTH{1'b0}}} & ~({{WIDTH{1'b1}}, {WIDTH{1'b0}}} >> amt));
    y     = '0;
    carry = 1'b0;
    unique case (op)
      SH_ROR: y = right_ext[2*WIDTH-1:WIDTH] | right_ext[WIDTH-1:0];
      SH_SLL: begin
        y     = left_ext[WIDTH-1:0];
        carry = left_ext[WIDTH];
      end
      SH_SLR, SH_SRA: begin
        y     = right_ext[2*WIDTH-1:WIDTH];
        carry = right_ext[WIDTH-1];
      end
    endcase
  end

endmodule
