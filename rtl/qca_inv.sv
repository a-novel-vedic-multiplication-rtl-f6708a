// qca_inv: QCA inverter, y = NOT a.
//
// In a QCA layout the inverter is a wire that forks and meets again at a
// 45-degree offset, so the output cell takes the opposite polarisation. As
// logic it is a plain complement. It supplies the complemented operands of
// the majority-gate XOR. Purely combinational.
module qca_inv (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
