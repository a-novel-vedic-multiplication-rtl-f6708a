// qca_half_adder: adds two bits, sum = a xor b, carry = a.b = M(a, b, 0).
//
// The multiplier uses two of these. The first combines the crosswise partial
// products A1.B0 and A0.B1 into product bit P1 and carry C1; the second adds
// C1 to the vertical product A1.B1, giving P2 as the sum and P3 as the carry.
// The sum is the majority-gate XOR, the carry a single majority gate.
// Purely combinational.
module qca_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  qca_xor2 u_xor (.a(a), .b(b), .y(sum));
  qca_and2 u_and (.a(a), .b(b), .y(carry));

endmodule
