// lfsr: 32-bit pseudo-random number generator of the execution unit.
//
// A linear feedback shift register in the internal-feedback (Galois) form: on
// each rising clock edge every stage takes the value of the stage below it, and
// stage 0 takes the top stage q[WIDTH-1]. A stage whose bit is set in TAPS
// takes q[i-1] XOR q[WIDTH-1] instead. The default TAPS places these XOR taps
// in front of stages 1, 5, 6 and 31, the positions drawn in the generator's
// structure diagram of the specification; the diagram elides the stages between
// them, and this design assumes no further taps there. The feedback tap set
// is a parameter, so another polynomial can be chosen without touching the code.
//
// Load and reset, which the specification requires but does not draw, are this
// design's: reset (synchronous, active high) loads SEED, a non-zero value so the
// register cannot start in the all-zero lock-up state; load (RANDOMSET) copies
// load_value into the register. Reset wins over load, load wins over the shift.
// Without reset or load the register advances on every clock edge, as in the
// diagram, where the clock reaches the flip-flops with no enable.
//
// Interface: q is the register itself (registered output, no combinational path
// from any input). Timing: a load or reset is visible on q after the edge that
// samples it; WIDTH flip-flops, nothing else is stored.
`timescale 1ns/1ps
module lfsr
  import alu_pkg::*;
#(
  parameter int unsigned      WIDTH = DATA_W,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'((64'd1 << 1) | (64'd1 << 5) | (64'd1 << 6) | (64'd1 << (WIDTH-1))),
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load,
  input  logic [WIDTH-1:0] load_value,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] q_next;

  // One shift step: rotate up by one, XOR the fed-back top bit into tapped stages
  always_comb begin
    q_next = {q[WIDTH-2:0], q[WIDTH-1]} ^ (TAPS & {WIDTH{q[WIDTH-1]}});
    q_next[0] = q[WIDTH-1];
  end

  always_ff @(posedge clk) begin
    if (reset)     q <= SEED;
    else if (load) q <= load_value;
    else           q <= q_next;
  end

endmodule
