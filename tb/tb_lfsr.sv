// tb_lfsr: self-checking testbench of the 32-bit LFSR.
//
// A reference register is stepped by hand, bit by bit, from the tap positions of
// the generator's structure diagram (stage 0 takes q31; stages 1, 5, 6 and 31 take
// q[i-1] XOR q31; every other stage takes q[i-1]) and compared with the block
// after every edge. Covers synchronous reset to the seed, parallel load, reset
// winning over load, and long free runs from random loaded values.
// Clock: 40 ns (25 MHz); inputs change 2 ns after the rising edge.
`timescale 1ns/1ps
module tb_lfsr;

  logic        clk = 1'b0;
  logic        reset, load;
  logic [31:0] load_value, q;
  logic [31:0] model;
  int unsigned checks = 0, failures = 0;

  lfsr dut (.clk(clk), .reset(reset), .load(load), .load_value(load_value), .q(q));

  always #20 clk = ~clk;

  function automatic logic [31:0] step(input logic [31:0] s);
    logic [31:0] n;
    for (int i = 0; i < 32; i++) begin
      if (i == 0)                                 n[i] = s[31];
      else if (i == 1 || i == 5 || i == 6 || i == 31) n[i] = s[i-1] ^ s[31];
      else                                        n[i] = s[i-1];
    end
    return n;
  endfunction

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, model);
    end
  endtask

  // One clock: apply controls 2 ns after the edge, update the model at the edge
  task automatic cycle(input logic r, input logic l, input logic [31:0] v);
    reset = r; load = l; load_value = v;
    @(posedge clk);
    if (r)      model = 32'h0000_0001;
    else if (l) model = v;
    else        model = step(model);
    #2;
  endtask

  initial begin
    reset = 1'b1; load = 1'b0; load_value = '0; model = '0;
    @(posedge clk); #2;
    model = 32'h0000_0001;
    check("reset value");
    // free run from the seed
    for (int i = 0; i < 100; i++) begin cycle(1'b0, 1'b0, '0); check("run from seed"); end
    // the top bit must feed the taps at least once in that run
    // load, then reset while loading (reset wins)
    cycle(1'b0, 1'b1, 32'hDEAD_BEEF); check("load");
    cycle(1'b1, 1'b1, 32'h1234_5678); check("reset over load");
    // a known step with the top bit set: 0x8000_0000 -> bits 0, 1, 5, 6, 31 set
    cycle(1'b0, 1'b1, 32'h8000_0000); check("load msb");
    cycle(1'b0, 1'b0, '0); check("feedback step");
    checks++;
    if (q !== 32'h8000_0063) begin failures++; $display("FAIL tap pattern q=%h", q); end
    // random loads followed by runs
    for (int k = 0; k < 50; k++) begin
      cycle(1'b0, 1'b1, $urandom()); check("random load");
      for (int i = 0; i < 20; i++) begin cycle(1'b0, 1'b0, $urandom()); check("run"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
