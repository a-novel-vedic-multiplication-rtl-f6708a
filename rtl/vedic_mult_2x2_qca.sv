// vedic_mult_2x2_qca: 2x2 Vedic (Urdhva Tiryagbhyam) multiplier built from
// majority gates and inverters and pipelined over four QCA clock zones.
//
// Datapath, all gates majority-based:
//   zone 0  partial products  P0 = A0.B0, X1 = A1.B0, X2 = A0.B1, X3 = A1.B1
//   zone 1  cross-product addition  P1 = X1 xor X2, C1 = X1.X2
//   zone 2  carry generation        P2 = C1 xor X3, P3 = C1.X3
//   zone 3  output cells            P = {P3, P2, P1, P0}
// The equations and the stage order follow the multiplier's description. The
// assignment of exactly one stage per zone, with the output cells as the
// fourth zone, is this design's reading of "each stage operates in a
// different clock zone".
//
// Timing (ZONED = 1): qca_clock_4phase makes one clk cycle one clock phase.
// a and b are sampled on the rising edge where in_sample is high (once every
// four cycles); the product of that pair appears on p three cycles later,
// after the edge where zone 3 latches, and stays until the next product
// replaces it four cycles on. The pipeline thus takes one pair per four
// cycles (one full QCA clock period) with a latency of four phases counted
// from the sampling edge. p_valid rises once the first sampled pair has
// reached the output and stays high; all zone registers clear on reset.
//
// ZONED = 0 removes the zone registers and leaves the purely combinational
// multiplier (the form meant for switches and LEDs on an FPGA board):
// p = a * b in the same cycle and p_valid is constantly high. The clock
// controller still runs so the phase outputs keep their meaning.
module vedic_mult_2x2_qca
  import qca_pkg::*;
#(
  parameter bit ZONED = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [1:0]                 a,           // A1 A0
  input  logic [1:0]                 b,           // B1 B0
  output logic [3:0]                 p,           // P3 P2 P1 P0
  output logic                       p_valid,
  output logic                       in_sample,   // a, b taken at this edge
  output qca_phase_e [NUM_ZONES-1:0] zone_phase
);

  logic [NUM_ZONES-1:0]     zone_latch;

  qca_clock_4phase #(.N_ZONES(NUM_ZONES)) u_clk (
    .clk        (clk),
    .rst_n      (rst_n),
    .zone_phase (zone_phase),
    .zone_latch (zone_latch)
  );

  // ---- zone 0: partial product generation --------------------------------
  pp_t pp_d, pp_q;
  vedic_pp_gen u_pp (.a(a), .b(b), .pp(pp_d));

  // ---- zone 1: cross-product addition ------------------------------------
  cross_t cross_d, cross_q;
  qca_half_adder u_ha_cross (
    .a(pp_q.x1), .b(pp_q.x2), .sum(cross_d.p1), .carry(cross_d.c1)
  );
  always_comb begin
    cross_d.x3 = pp_q.x3;
    cross_d.p0 = pp_q.p0;
  end

  // ---- zone 2: carry generation ------------------------------------------
  logic [3:0] prod_d, prod_q;
  qca_half_adder u_ha_carry (
    .a(cross_q.c1), .b(cross_q.x3), .sum(prod_d[2]), .carry(prod_d[3])
  );
  always_comb prod_d[1:0] = {cross_q.p1, cross_q.p0};

  // ---- zone 3: output cells ----------------------------------------------
  logic [3:0] out_q;

  if (ZONED) begin : g_zoned
    logic [NUM_ZONES-1:0] full_q;   // zone k holds a sampled pair

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pp_q    <= '0;
        cross_q <= '0;
        prod_q  <= '0;
        out_q   <= '0;
        full_q  <= '0;
      end else begin
        if (zone_latch[0]) begin pp_q    <= pp_d;    full_q[0] <= 1'b1;      end
        if (zone_latch[1]) begin cross_q <= cross_d; full_q[1] <= full_q[0]; end
        if (zone_latch[2]) begin prod_q  <= prod_d;  full_q[2] <= full_q[1]; end
        if (zone_latch[3]) begin out_q   <= prod_q;  full_q[3] <= full_q[2]; end
      end
    end

    always_comb begin
      p_valid   = full_q[3];
      in_sample = zone_latch[0];
    end
  end else begin : g_comb
    always_comb begin
      pp_q      = pp_d;
      cross_q   = cross_d;
      prod_q    = prod_d;
      out_q     = prod_q;
      p_valid   = 1'b1;
      in_sample = 1'b1;
    end
  end

  always_comb p = out_q;

  // The zone registers must load strictly in zone order, one per cycle.
  a_one_zone_latches : assert property (@(posedge clk)
    $onehot(zone_latch));

endmodule
