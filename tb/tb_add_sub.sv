// tb_add_sub: self-checking testbench of the adder/subtracter.
//
// Compares sum, carry-out and two's-complement overflow against a 33-bit
// integer model (overflow judged from the signed 64-bit result leaving the
// 32-bit range) for directed corner cases and random operands, both for
// addition and for subtraction. The block is combinational: each vector is
// applied and checked 2 ns later.
`timescale 1ns/1ps
module tb_add_sub;

  logic [31:0] a, b, sum;
  logic        sub, carry, overflow;
  int unsigned checks = 0, failures = 0;
  int unsigned n_carry = 0, n_ovf = 0;

  add_sub dut (.a(a), .b(b), .sub(sub), .sum(sum), .carry(carry), .overflow(overflow));

  task automatic apply(input logic [31:0] x, input logic [31:0] y, input logic s);
    longint sres;
    logic [32:0] ures;
    logic e_c, e_v;
    a = x; b = y; sub = s;
    #2;
    if (!s) begin
      ures = {1'b0, x} + {1'b0, y};
      sres = longint'($signed(x)) + longint'($signed(y));
    end else begin
      ures = {1'b0, x} + {1'b0, ~y} + 33'd1;   // carry-out = 1 when x >= y unsigned
      sres = longint'($signed(x)) - longint'($signed(y));
    end
    e_c = s ? (x >= y) : ures[32];
    e_v = (sres > 64'sd2147483647) || (sres < -64'sd2147483648);
    checks++;
    if (sum !== ures[31:0] || carry !== e_c || overflow !== e_v) begin
      failures++;
      $display("FAIL %s a=%h b=%h: sum=%h c=%b v=%b expected %h %b %b",
               s ? "sub" : "add", x, y, sum, carry, overflow, ures[31:0], e_c, e_v);
    end
    if (carry) n_carry++;
    if (overflow) n_ovf++;
  endtask

  initial begin
    apply(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h8000_0000, 32'h0000_0001, 1'b1);
    apply(32'h7FFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(32'h0000_0000, 32'h0000_0000, 1'b1);
    apply(32'h0000_0005, 32'h0000_0007, 1'b1);
    apply(32'h0000_0000, 32'h8000_0000, 1'b1);
    for (int i = 0; i < 2000; i++) apply($urandom(), $urandom(), 1'($urandom()));
    checks++;
    if (n_carry == 0 || n_ovf == 0) begin failures++; $display("FAIL carry/overflow never seen"); end
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
