// qca_and2: two-input AND made from one majority gate with its third input
// fixed to logic 0, AND(a, b) = M(a, b, 0). In QCA the fixed input is a cell
// pinned to polarisation -1. Purely combinational.
module qca_and2 (
  input  logic a,
  input  logic b,
  output logic y
);

  qca_maj3 u_maj (.a(a), .b(b), .c(1'b0), .y(y));

endmodule
