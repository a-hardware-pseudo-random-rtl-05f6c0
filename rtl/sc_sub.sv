// sc_sub: unipolar scaled stochastic subtractor.
//
// The scaled adder with its second stream inverted: with a 0.5 select stream
// the output density is (P(a) + 1 - P(b)) / 2, that is 0.5 + (P(a) - P(b)) / 2.
// Ports: a (mux input 1), b (inverted into mux input 0), sel, y.
// Purely combinational. Follows the published circuit.
module sc_sub (
  input  logic a,
  input  logic b,
  input  logic sel,
  output logic y
);
  logic b_n;
  assign b_n = ~b;

  sc_add u_add (.a(a), .b(b_n), .sel(sel), .y(y));
endmodule
