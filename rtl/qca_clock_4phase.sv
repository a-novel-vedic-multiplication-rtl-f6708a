// qca_clock_4phase: four-phase clock-zone controller for a QCA pipeline.
//
// QCA circuits are clocked by zones. Each zone cycles through four phases
// (switch, hold, release, relax) and zone k runs one phase behind zone k-1, so
// a value computed in zone k-1 is held while zone k switches on it. This
// module models that scheme on an ordinary clock: one clk cycle is one phase.
// A two-bit phase counter, cleared by reset, is the phase of zone 0; zone k
// is in phase (counter - k) mod 4.
//
// Outputs, all functions of the counter only:
//   zone_phase  phase of every zone
//   zone_latch  one bit per zone, high in the cycle that zone is in SWITCH;
//               a zone register loads on the rising clk edge that ends its
//               SWITCH phase and keeps the value through HOLD, RELEASE and
//               RELAX, so each zone latches once per four cycles and zone k
//               latches one cycle after zone k-1.
// Four phases and one zone per multiplier stage follow the multiplier's
// description; the phase names, the phase-per-cycle mapping and the reset
// value are this design's choices.
module qca_clock_4phase
  import qca_pkg::*;
#(
  parameter int unsigned N_ZONES = NUM_ZONES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output qca_phase_e [N_ZONES-1:0] zone_phase,
  output logic       [N_ZONES-1:0] zone_latch
);

  logic [1:0] ph_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph_q <= 2'd0;
    else        ph_q <= ph_q + 2'd1;
  end

  always_comb begin
    for (int unsigned k = 0; k < N_ZONES; k++) begin
      zone_phase[k] = qca_phase_e'(ph_q - 2'(k));
      zone_latch[k] = (zone_phase[k] == PH_SWITCH);
    end
  end

endmodule
