// add_sub: the execution unit's single adder/subtracter.
//
// All arithmetic instructions (ADD, SUBB and the address sums of JUMP, JUMPI and
// LOAD) share this one WIDTH-bit adder, in keeping with the specification's
// request for minimum area. Subtraction is a + ~b + 1: b is inverted and the
// carry-in is set when sub is high. The ripple/carry architecture is left to
// synthesis (the specification allows any architecture).
//
// Outputs: sum; carry, the carry out of the top bit (for a subtraction this is
// 1 when no borrow occurs, a convention this design chose); overflow, set when
// the two's-complement result does not fit, i.e. both adder inputs have the same
// sign and the sum's sign differs. Purely combinational.
`timescale 1ns/1ps
module add_sub
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] sum,
  output logic             carry,
  output logic             overflow
);

  logic [WIDTH-1:0] b_eff;

  always_comb begin
    b_eff           = sub ? ~b : b;
    {carry, sum}    = {1'b0, a} + {1'b0, b_eff} + {{WIDTH{1'b0}}, sub};
    overflow        = (a[WIDTH-1] == b_eff[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
  end

endmodule
