// lfsr: loadable maximal-length Fibonacci LFSR, the random source of a
// stochastic number generator.
//
// Each cycle the register shifts left by one and the XOR of the tapped stages
// enters bit 0. With a maximal-length tap mask the state visits every nonzero
// W-bit value once in 2^W - 1 cycles, so a comparison against it over one full
// period is exact. A load writes `seed` into the register instead of shifting;
// a zero seed (which would lock the register) is replaced by 1.
//
// Ports: clk, rst_n (synchronous, active low, state := 1), load, seed, state.
// Timing: `state` is registered; a load in cycle t shows in cycle t+1.
//
// The 16-bit width follows the PRNG's published precision; the polynomial,
// the Fibonacci form and the reset value are this design's choices.
module lfsr #(
  parameter int unsigned    W    = prng_pkg::W,
  parameter logic [W-1:0]   TAPS = W'(prng_pkg::TAPS_X)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  output logic [W-1:0] state
);

  logic feedback;
  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)          state <= W'(1);
    else if (load)       state <= (seed == '0) ? W'(1) : seed;
    else                 state <= {state[W-2:0], feedback};
  end

endmodule
