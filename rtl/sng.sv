// sng: improved stochastic number generator (SNG) with a per-period seed
// perturbation.
//
// A binary fraction x (k / 2^W) becomes a bit stream whose density of ones is
// x: each cycle the comparator outputs 1 when the LFSR value Y is below X.
// Over one full LFSR period (2^W - 1 cycles) the stream holds exactly
// max(x - 1, 0) ones. A seed counter sits in front of the LFSR. On the last
// cycle of every period (`period_end`, the slow clock of the improved SNG) the
// seed counter is incremented and the LFSR restarts from the new seed, so two
// periods that convert the same x produce differently ordered streams. This
// ordering change is what breaks short cycles once the streams are multiplied.
//
// Ports: clk, rst_n, init (load seed_init into the seed counter and the LFSR),
// seed_init, period_end, x, bit_out, seed.
// Timing: bit_out is combinational from the registered LFSR state and x.
//
// The comparator sense (Y < X), the seed counter and its increment once per
// LFSR period follow the published SNG. Using one clock with an enable in
// place of two clocks, reloading the LFSR from the seed at every period end,
// and skipping seed 0 are this design's choices.
module sng #(
  parameter int unsigned  W    = prng_pkg::W,
  parameter logic [W-1:0] TAPS = W'(prng_pkg::TAPS_X)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic [W-1:0] seed_init,
  input  logic         period_end,
  input  logic [W-1:0] x,
  output logic         bit_out,
  output logic [W-1:0] seed
);

  logic [W-1:0] seed_inc;
  logic [W-1:0] lfsr_seed;
  logic [W-1:0] y;

  // Seed counter: seed = seed + 1 once per LFSR period (0 is skipped).
  assign seed_inc = (seed + W'(1) == '0) ? W'(1) : seed + W'(1);

  always_ff @(posedge clk) begin
    if (!rst_n)          seed <= W'(1);
    else if (init)       seed <= seed_init;
    else if (period_end) seed <= seed_inc;
  end

  assign lfsr_seed = init ? seed_init : seed_inc;

  lfsr #(.W(W), .TAPS(TAPS)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .load (init | period_end),
    .seed (lfsr_seed),
    .state(y)
  );

  // Comparator: 1 when Y < X.
  assign bit_out = (y < x);

endmodule
