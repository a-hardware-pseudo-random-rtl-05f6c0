// elm_update: binary back end of the enhanced logistic map.
//
// The map is x' = 4 x (1 - x) - d x (1 - x), which keeps every operand in
// [0, 1] so that it can be carried by unipolar streams. The stochastic part
// delivers two counts: cnt_xx = x (1 - x) and cnt_dxx = d x (1 - x). This
// block finishes the iteration in binary:
//   Shifter 1   : 4 x (1 - x)  = cnt_xx << 2
//   Subtractor  : x'           = (cnt_xx << 2) - cnt_dxx
//   Shifter 2   : d'           = x' >> 2   (the next control parameter,
//                                           in [0, 0.25))
// Counter 1 counts a sub-stream of what Counter 2 counts (Multiplier 2 is
// Multiplier 1 ANDed with the d stream), so cnt_dxx <= cnt_xx and the
// difference is never negative. 4 x (1 - x) can reach 1.0 at x = 0.5, one
// more than a W-bit fraction holds, so x' saturates at 2^W - 1; the
// saturation is this design's choice, the shifts and the subtraction are the
// published ones.
// Ports: cnt_xx, cnt_dxx (W-bit fractions), x_next, d_next. Combinational.
module elm_update #(
  parameter int unsigned W = prng_pkg::W
) (
  input  logic [W-1:0] cnt_xx,
  input  logic [W-1:0] cnt_dxx,
  output logic [W-1:0] x_next,
  output logic [W-1:0] d_next
);

  logic [W+1:0] shifted;   // Shifter 1 output, two extra integer bits
  logic [W+1:0] diff;      // Subtractor output before saturation

  always_comb begin
    shifted = {cnt_xx, 2'b00};
    diff    = shifted - {2'b00, cnt_dxx};
    if (diff[W+1:W] != 2'b00) x_next = '1;   // 1.0 or more
    else                      x_next = diff[W-1:0];
    d_next = {2'b00, x_next[W-1:2]};
  end

endmodule
