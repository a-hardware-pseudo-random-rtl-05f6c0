// sc_mul: unipolar stochastic multiplier.
//
// For two uncorrelated bit streams with one-densities P(a) and P(b), the AND
// of the streams has density P(a) * P(b). The inputs must come from
// independent generators; correlated inputs give a wrong product.
// Ports: a, b (streams), y (product stream). Purely combinational.
// The AND gate is the published multiplier; nothing here is a local choice.
module sc_mul (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a & b;
endmodule
