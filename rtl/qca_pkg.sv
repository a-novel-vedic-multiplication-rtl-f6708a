// qca_pkg: types and constants shared by the clock-zoned 2x2 Vedic multiplier.
//
// qca_phase_e names the four phases a QCA clock zone passes through. A zone
// computes (its cells polarise) in SWITCH, keeps its value in HOLD while the
// next zone reads it, and is depolarised in RELEASE and RELAX. Neighbouring
// zones are one phase apart, so data advances one zone per phase. The phase
// names and their order are the usual QCA convention; the multiplier's
// description only states that a four-phase scheme drives four clock zones.
//
// pp_t bundles the partial products of the Urdhva Tiryagbhyam (vertical and
// crosswise) step: p0 = A0.B0, x1 = A1.B0, x2 = A0.B1, x3 = A1.B1.
package qca_pkg;

  typedef enum logic [1:0] {
    PH_SWITCH  = 2'd0,
    PH_HOLD    = 2'd1,
    PH_RELEASE = 2'd2,
    PH_RELAX   = 2'd3
  } qca_phase_e;

  // Clock zones the multiplier uses: partial products, cross-product
  // addition, carry generation, output cells.
  localparam int unsigned NUM_ZONES = 4;

  typedef struct packed {
    logic x3;  // A1.B1, vertical on the high bits
    logic x2;  // A0.B1, crosswise
    logic x1;  // A1.B0, crosswise
    logic p0;  // A0.B0, vertical on the low bits, already product bit 0
  } pp_t;

  // Signals carried from the cross-product zone to the carry zone.
  typedef struct packed {
    logic x3;  // A1.B1 passed along
    logic c1;  // carry of X1 + X2
    logic p1;  // product bit 1
    logic p0;  // product bit 0 passed along
  } cross_t;

endpackage
