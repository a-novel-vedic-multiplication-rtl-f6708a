// qca_or2: two-input OR made from one majority gate with its third input
// fixed to logic 1, OR(a, b) = M(a, b, 1). In QCA the fixed input is a cell
// pinned to polarisation +1. Purely combinational.
module qca_or2 (
  input  logic a,
  input  logic b,
  output logic y
);

  qca_maj3 u_maj (.a(a), .b(b), .c(1'b1), .y(y));

endmodule
