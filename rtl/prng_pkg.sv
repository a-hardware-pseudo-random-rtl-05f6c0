// prng_pkg: constants shared by the stochastic-computing logistic-map PRNG.
//
// The datapath precision is 16 bits: each stochastic number generator uses a
// 16-bit LFSR, so one stochastic bit stream is 2^16 - 1 bits long and every
// binary value is a 16-bit unsigned fraction k / 2^16. The three feedback
// polynomials are this design's choice: any maximal-length 16-bit polynomials
// would do, but the three streams that are multiplied together must come from
// different generators so that they are uncorrelated.
package prng_pkg;

  localparam int unsigned W = 16;

  // Fibonacci tap masks (bit i set = stage i+1 is tapped); all maximal length.
  localparam logic [15:0] TAPS_X  = 16'hD008;  // x^16 + x^15 + x^13 + x^4 + 1
  localparam logic [15:0] TAPS_X1 = 16'hB400;  // x^16 + x^14 + x^13 + x^11 + 1
  localparam logic [15:0] TAPS_U  = 16'h8805;  // x^16 + x^12 + x^3 + x + 1

endpackage
