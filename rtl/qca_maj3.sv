// qca_maj3: three-input majority gate, the basic QCA logic element.
//
// y = M(a, b, c) = a.b + b.c + c.a: the output takes the value held by at
// least two of the three inputs, as the central cell of a QCA majority gate
// takes the polarisation of most of its neighbours. Every other gate of the
// multiplier is built from this one (AND and OR by tying one input to a
// constant). Purely combinational; no clock.
module qca_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (b & c) | (c & a);

endmodule
