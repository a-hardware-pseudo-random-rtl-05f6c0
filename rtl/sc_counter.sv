// sc_counter: de-randomizer that turns a stochastic bit stream back into a
// binary fraction by counting its ones.
//
// The register holds the ones seen since the last clear; `count` adds the
// current cycle's bit combinationally, so on the last cycle of an LFSR period
// `count` is the number of ones in the whole 2^W - 1 bit stream, i.e. the
// value as a fraction of 2^W. `clear` (asserted on that last cycle, or on
// init) restarts the register at zero for the next period.
// Ports: clk, rst_n (synchronous, active low), clear, bit_in, count.
// Timing: no latency from bit_in to count; W bits cannot overflow within a
// period of 2^W - 1 bits.
// Counting ones is the published de-randomizer; the zero-latency output and
// the clear input are this design's choices.
module sc_counter #(
  parameter int unsigned W = prng_pkg::W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         bit_in,
  output logic [W-1:0] count
);

  logic [W-1:0] acc;

  assign count = acc + W'(bit_in);

  always_ff @(posedge clk) begin
    if (!rst_n)     acc <= '0;
    else if (clear) acc <= '0;
    else            acc <= count;
  end

endmodule
