// iter_ctrl: iteration timer of the PRNG.
//
// One iteration of the map takes one full LFSR period, 2^W - 1 bit-clock
// cycles (65535 at W = 16, which gives 100 MHz / 65535 = 1.53 kHz new numbers).
// A down counter starts at 2^W - 2 on init and raises `period_end` on the
// cycle it reaches 0, then wraps back to 2^W - 2. `period_end` plays the role
// of the slow clock of the improved SNG: it closes the counting window, loads
// the new x and d and advances the seeds.
// Ports: clk, rst_n (synchronous, active low), init, period_end.
// Timing: after init in cycle t, period_end is high in cycles
// t + 2^W - 1, t + 2 (2^W - 1), ...
// The period length follows the published rate; the counter is this design's.
module iter_ctrl #(
  parameter int unsigned W = prng_pkg::W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  output logic period_end
);

  localparam logic [W-1:0] LAST = W'((2 ** W) - 2);

  logic [W-1:0] remaining;

  assign period_end = (remaining == '0) && !init;

  always_ff @(posedge clk) begin
    if (!rst_n)                     remaining <= LAST;
    else if (init || period_end)    remaining <= LAST;
    else                            remaining <= remaining - W'(1);
  end

endmodule
