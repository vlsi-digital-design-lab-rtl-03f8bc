// tb_execution_unit: end-to-end self-checking testbench of the 32-bit execution unit.
//
// Runs the unit at its default parameters with a 25 MHz clock (40 ns period).
// As the specification prescribes for simulation, opcode, a and b change 2 ns
// after each rising edge; result and nzco are checked 36 ns later, within the
// same cycle, which checks that every instruction completes in one cycle.
// The reference model is written here from the instruction table: the ALU
// operations bit by bit or with integer arithmetic, and its own copy of the
// generator register stepped from the tap positions of the structure diagram.
//
// The run covers: reset, every instruction of the table, the unassigned opcodes,
// RANDOMSET followed at once by RANDOMIZE (returns b), the generator stepping
// while other instructions run, and a mid-run reset. It counts how often each
// mechanism happened (carry from the adder, carry from a shift, overflow, zero
// and negative results, each opcode) and counts a failure for any that never did.
`timescale 1ns/1ps
module tb_execution_unit;

  logic        clk = 1'b0;
  logic        reset;
  logic [4:0]  opcode;
  logic [31:0] a, b, result;
  logic [3:0]  nzco;

  int unsigned checks = 0, failures = 0;
  int unsigned op_seen [32];
  int unsigned n_add_carry = 0, n_shift_carry = 0, n_ovf = 0, n_zero = 0, n_neg = 0;
  int unsigned n_randomize_after_set = 0, n_reset = 0, n_lfsr_step = 0;

  logic [31:0] rng;          // model of the generator register
  logic        last_was_set; // previous cycle executed RANDOMSET
  logic [31:0] last_set_b;

  execution_unit dut (.clk(clk), .reset(reset), .opcode(opcode), .a(a), .b(b),
                      .result(result), .nzco(nzco));

  always #20 clk = ~clk;

  function automatic logic [31:0] rng_step(input logic [31:0] s);
    logic [31:0] n;
    for (int i = 0; i < 32; i++)
      n[i] = (i == 0) ? s[31] : (s[i-1] ^ (s[31] & (i == 1 || i == 5 || i == 6 || i == 31)));
    return n;
  endfunction

  // Expected {result, nzco} for the current inputs and generator state
  function automatic logic [35:0] expect_out(input logic [4:0] op, input logic [31:0] x,
                                             input logic [31:0] y, input logic [31:0] r);
    logic [31:0] res;
    logic        c, v, nop;
    longint      s;
    int          n;
    c = 1'b0; v = 1'b0; nop = 1'b0; res = x;
    n = int'(y[2:0]);
    case (op)
      5'b00001: res = x | y;
      5'b00010: res = x ^ y;
      5'b00011: res = ~(x | y);
      5'b00100: res = x & y;
      5'b00101, 5'b01111, 5'b10010, 5'b10011: begin
        res = x + y;
        c   = ({1'b0, x} + {1'b0, y}) > 33'h0_FFFF_FFFF;
        s   = longint'($signed(x)) + longint'($signed(y));
        v   = (s != longint'($signed(res)));
      end
      5'b00110: begin
        res = x - y;
        c   = (x >= y);                       // carry-out of x + ~y + 1
        s   = longint'($signed(x)) - longint'($signed(y));
        v   = (s != longint'($signed(res)));
      end
      5'b00111: res = ~y;
      5'b01000: res = (x >> n) | (n == 0 ? 32'h0 : x << (32 - n));
      5'b01001: begin res = x << n; c = (n == 0) ? 1'b0 : x[32-n]; end
      5'b01010: begin res = x >> n; c = (n == 0) ? 1'b0 : x[n-1];  end
      5'b01011: begin res = 32'($signed(x) >>> n); c = (n == 0) ? 1'b0 : x[n-1]; end
      5'b11011: res = y;
      5'b11100: begin res = x; res[y[4:0]] = 1'b1; end
      5'b11101: begin res = x; res[y[4:0]] = 1'b0; end
      5'b11110: res = y;
      5'b11111: res = r;
      default: nop = 1'b1;
    endcase
    if (nop) return {x, 4'b0100};
    return {res, res[31], res == 32'h0, c, v};
  endfunction

  // One instruction: drive 2 ns after the edge, check late in the cycle, step the model
  task automatic run(input logic rst, input logic [4:0] op, input logic [31:0] x,
                     input logic [31:0] y);
    logic [35:0] e;
    reset = rst; opcode = op; a = x; b = y;
    #36;
    if (!rst) begin
      e = expect_out(op, x, y, rng);
      checks++;
      if ({result, nzco} !== e) begin
        failures++;
        $display("FAIL op=%b a=%h b=%h: result=%h nzco=%b expected %h %b",
                 op, x, y, result, nzco, e[35:4], e[3:0]);
      end
      op_seen[op]++;
      if (nzco[1] && (op inside {5'b00101, 5'b00110, 5'b01111, 5'b10010, 5'b10011})) n_add_carry++;
      if (nzco[1] && (op inside {5'b01001, 5'b01010, 5'b01011})) n_shift_carry++;
      if (nzco[0]) n_ovf++;
      if (nzco[2] && op != 5'b00000) n_zero++;
      if (nzco[3]) n_neg++;
      if (op == 5'b11111 && last_was_set) begin
        n_randomize_after_set++;
        checks++;
        if (result !== last_set_b) begin
          failures++;
          $display("FAIL RANDOMIZE after RANDOMSET: %h expected %h", result, last_set_b);
        end
      end
    end
    @(posedge clk);
    last_was_set = !rst && (op == 5'b11110);
    last_set_b   = y;
    if (rst)                 begin rng = 32'h0000_0001; n_reset++; end
    else if (op == 5'b11110) rng = y;
    else                     begin rng = rng_step(rng); n_lfsr_step++; end
    #2;
  endtask

  localparam logic [4:0] VALID [20] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100,
                                         5'b00101, 5'b00110, 5'b00111, 5'b01000, 5'b01001,
                                         5'b01010, 5'b01011, 5'b01111, 5'b10010, 5'b10011,
                                         5'b11011, 5'b11100, 5'b11101, 5'b11110, 5'b11111};

  initial begin
    reset = 1'b1; opcode = '0; a = '0; b = '0; rng = '0; last_was_set = 1'b0; last_set_b = '0;
    @(posedge clk); #2;
    rng = 32'h0000_0001;
    n_reset++;
    // Reset holds the seed: RANDOMIZE right after reset returns it
    run(1'b0, 5'b11111, 32'h0, 32'h0);
    checks++;
    if (result !== 32'h0000_0002) begin
      failures++; $display("FAIL generator after reset + 1 step: %h", result);
    end
    // Directed corner cases
    run(1'b0, 5'b00000, 32'h8000_0000, 32'h1);       // NOP forces flags 0100
    run(1'b0, 5'b00000, 32'h0, 32'h0);
    run(1'b0, 5'b00101, 32'h7FFF_FFFF, 32'h1);       // add overflow
    run(1'b0, 5'b00101, 32'hFFFF_FFFF, 32'h1);       // add carry, zero
    run(1'b0, 5'b00110, 32'h8000_0000, 32'h1);       // sub overflow
    run(1'b0, 5'b00110, 32'h5, 32'h5);               // sub zero
    run(1'b0, 5'b00110, 32'h5, 32'h7);               // sub borrow
    run(1'b0, 5'b01111, 32'h8000_0000, 32'h8000_0000);
    run(1'b0, 5'b10010, 32'h1000, 32'h24);
    run(1'b0, 5'b10011, 32'hFFFF_FFF0, 32'h20);
    run(1'b0, 5'b01001, 32'h8000_0000, 32'h1);       // SLL carry
    run(1'b0, 5'b01010, 32'h0000_0001, 32'h1);       // SLR carry, zero
    run(1'b0, 5'b01011, 32'h8000_00FF, 32'h7);       // SRA negative, carry
    run(1'b0, 5'b01000, 32'h0000_00F1, 32'h4);       // ROR, no carry
    run(1'b0, 5'b11100, 32'h0, 32'h1F);              // BITSET bit 31
    run(1'b0, 5'b11101, 32'hFFFF_FFFF, 32'h0);       // BITCLEAR bit 0
    run(1'b0, 5'b11101, 32'h0000_0400, 32'hFFFF_FFEA); // BITCLEAR bit 10, zero
    run(1'b0, 5'b00111, 32'h0, 32'hFFFF_FFFF);       // NOT zero
    run(1'b0, 5'b00011, 32'h0, 32'h0);               // NOR negative
    run(1'b0, 5'b11011, 32'h1, 32'h8000_0000);       // MOVE
    run(1'b0, 5'b11110, 32'h0, 32'hCAFE_F00D);       // RANDOMSET
    run(1'b0, 5'b11111, 32'h0, 32'h0);               // RANDOMIZE returns b
    run(1'b0, 5'b11111, 32'h0, 32'h0);               // then the next step
    run(1'b0, 5'b01100, 32'h1234, 32'h5678);         // unassigned opcodes behave as NOP
    run(1'b0, 5'b10000, 32'h0, 32'h5678);
    // Random instruction stream, with an occasional reset
    for (int i = 0; i < 6000; i++) begin
      logic [4:0] op;
      logic [31:0] x, y;
      op = ($urandom_range(0, 9) == 0) ? 5'($urandom()) : VALID[$urandom_range(0, 19)];
      x = $urandom(); y = $urandom();
      case ($urandom_range(0, 7))
        0: y = x;                    // equal operands: zero results
        1: y = -x;
        2: x = 32'h7FFF_FFFF - 32'($urandom_range(0, 3));
        default: ;
      endcase
      if (op == 5'b11110 && $urandom_range(0, 1) == 1) begin
        run(1'b0, op, x, y);
        op = 5'b11111;
      end
      run(($urandom_range(0, 499) == 0), op, x, y);
    end
    // Every mechanism must have happened at least once
    foreach (VALID[k]) begin
      checks++;
      if (op_seen[VALID[k]] == 0) begin failures++; $display("FAIL opcode %b never ran", VALID[k]); end
    end
    checks++;
    if (n_add_carry == 0 || n_shift_carry == 0 || n_ovf == 0 || n_zero == 0 || n_neg == 0 ||
        n_randomize_after_set < 2 || n_reset < 2 || n_lfsr_step == 0) begin
      failures++;
      $display("FAIL coverage: add_carry=%0d shift_carry=%0d ovf=%0d zero=%0d neg=%0d rand_after_set=%0d reset=%0d",
               n_add_carry, n_shift_carry, n_ovf, n_zero, n_neg, n_randomize_after_set, n_reset);
    end
    $display("mechanisms: add_carry=%0d shift_carry=%0d overflow=%0d zero=%0d negative=%0d randomize_after_set=%0d resets=%0d lfsr_steps=%0d",
             n_add_carry, n_shift_carry, n_ovf, n_zero, n_neg, n_randomize_after_set, n_reset, n_lfsr_step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
