// qca_xor2: two-input XOR from three majority gates and two inverters.
//
//   y = M( M(a, b', 0), M(a', b, 0), 1 ) = a.b' + a'.b
//
// Two majority gates with a 0 input form the AND terms a.b' and a'.b; a third
// with a 1 input ORs them. The gate count (three majority gates, two
// inverters) is the one the multiplier's design states. The design's printed
// form places the constants the other way round, M(M(a',b,1), M(a,b',1), 0),
// which evaluates to XNOR and would contradict both P1 = X1 xor X2 and the
// results table; this module keeps the gate count and uses the assignment of
// constants that gives XOR. Purely combinational.
module qca_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  logic a_n, b_n;   // complemented operands
  logic t_ab_n;     // a . b'
  logic t_an_b;     // a' . b

  qca_inv  u_inv_a (.a(a), .y(a_n));
  qca_inv  u_inv_b (.a(b), .y(b_n));
  qca_and2 u_and_0 (.a(a),   .b(b_n), .y(t_ab_n));
  qca_and2 u_and_1 (.a(a_n), .b(b),   .y(t_an_b));
  qca_or2  u_or    (.a(t_ab_n), .b(t_an_b), .y(y));

endmodule
