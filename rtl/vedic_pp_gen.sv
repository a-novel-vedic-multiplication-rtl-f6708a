// vedic_pp_gen: partial-product stage of the 2x2 Urdhva Tiryagbhyam
// (vertical and crosswise) multiplier.
//
// All four one-bit products are formed at once, each by a majority gate with
// one input fixed to 0:
//   p0 = A0.B0 (vertical, low)    x1 = A1.B0 (crosswise)
//   x2 = A0.B1 (crosswise)        x3 = A1.B1 (vertical, high)
// p0 is already the least significant product bit. Purely combinational.
module vedic_pp_gen
  import qca_pkg::*;
(
  input  logic [1:0] a,   // multiplicand A1 A0
  input  logic [1:0] b,   // multiplier   B1 B0
  output pp_t        pp
);

  qca_and2 u_p0 (.a(a[0]), .b(b[0]), .y(pp.p0));
  qca_and2 u_x1 (.a(a[1]), .b(b[0]), .y(pp.x1));
  qca_and2 u_x2 (.a(a[0]), .b(b[1]), .y(pp.x2));
  qca_and2 u_x3 (.a(a[1]), .b(b[1]), .y(pp.x3));

endmodule
