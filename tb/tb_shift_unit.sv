// tb_shift_unit: self-checking testbench of the rotate/shift unit.
//
// The reference moves the operand one bit at a time in a loop, remembering the
// last bit that left, so it shares no code with the block's barrel shifter. All
// four operations and all eight shift amounts are applied to directed and
// random operands; the unit is combinational and is checked 2 ns after each
// vector.
`timescale 1ns/1ps
module tb_shift_unit;
  import alu_pkg::*;

  logic [31:0] a, y;
  logic [2:0]  amt;
  shift_op_e   op;
  logic        carry;
  int unsigned checks = 0, failures = 0;

  shift_unit dut (.a(a), .amt(amt), .op(op), .y(y), .carry(carry));

  task automatic apply(input logic [31:0] x, input logic [2:0] n, input shift_op_e o);
    logic [31:0] r;
    logic        c;
    r = x; c = 1'b0;
    for (int i = 0; i < int'(n); i++) begin
      case (o)
        SH_ROR: r = {r[0], r[31:1]};
        SH_SLL: begin c = r[31]; r = {r[30:0], 1'b0}; end
        SH_SLR: begin c = r[0];  r = {1'b0, r[31:1]}; end
        SH_SRA: begin c = r[0];  r = {r[31], r[31:1]}; end
      endcase
    end
    a = x; amt = n; op = o;
    #2;
    checks++;
    if (y !== r || carry !== c) begin
      failures++;
      $display("FAIL %s a=%h n=%0d: y=%h c=%b expected %h %b", o.name(), x, n, y, carry, r, c);
    end
  endtask

  initial begin
    for (int o = 0; o < 4; o++)
      for (int n = 0; n < 8; n++) begin
        apply(32'h8000_0001, 3'(n), shift_op_e'(o));
        apply(32'h7FFF_FFFE, 3'(n), shift_op_e'(o));
        apply(32'hF0F0_1234, 3'(n), shift_op_e'(o));
        for (int k = 0; k < 30; k++) apply($urandom(), 3'(n), shift_op_e'(o));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
