// lfsr: pseudo-random number generator for the stochastic decoder.
//
// A Fibonacci linear feedback shift register: each step shifts the register
// left by one and feeds in the XOR of the tapped bits (TAPS has a 1 for each
// tapped bit). The register advances STEPS steps per enabled clock, so with
// STEPS = WIDTH every output bit is fresh in every cycle; the extra steps are
// plain XOR logic unrolled in one cycle. The default taps 32, 22, 2, 1 give a
// maximal-length sequence of period 2^32 - 1.
//
// Interface: clk, rst (synchronous, loads seed), en (advance), seed (start
// state, normally a constant; a port rather than a parameter so that many
// generators with different seeds share one module), rnd (state).
// Timing: rnd changes one cycle after an enabled clock edge.
//
// The document asks for an LFSR that produces a random number every clock,
// with XOR feedback; the width, taps, seed and multi-step advance are this
// design's choices. The seed must not be zero (the all-zero state never leaves).
module lfsr #(
  parameter int unsigned        WIDTH = 32,
  parameter logic [WIDTH-1:0]   TAPS  = 32'h8020_0003,
  parameter int unsigned        STEPS = WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] seed,
  output logic [WIDTH-1:0] rnd
);

  logic [WIDTH-1:0] state_q, state_d;

  always_comb begin
    state_d = state_q;
    for (int unsigned s = 0; s < STEPS; s++)
      state_d = {state_d[WIDTH-2:0], ^(state_d & TAPS)};
  end

  always_ff @(posedge clk) begin
    if (rst)     state_q <= seed;
    else if (en) state_q <= state_d;
  end

  assign rnd = state_q;

  // The all-zero state would lock the register.
  assert property (@(posedge clk) rst |-> seed != '0)
    else $error("lfsr: seed must be non-zero");

endmodule
