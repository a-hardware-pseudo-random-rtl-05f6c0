// sc_add: unipolar scaled stochastic adder.
//
// The sum of two unipolar values can reach 2, outside the [0, 1] range a
// stream can hold, so the adder computes (P(a) + P(b)) / 2: a 2:1 multiplexer
// passes `a` when the select stream is 1 and `b` when it is 0, and the select
// stream carries density 0.5.
// Ports: a (mux input 1), b (mux input 0), sel, y. Purely combinational.
// Follows the published multiplexer adder; nothing here is a local choice.
module sc_add (
  input  logic a,
  input  logic b,
  input  logic sel,
  output logic y
);
  always_comb begin
    if (sel) y = a;
    else     y = b;
  end
endmodule
