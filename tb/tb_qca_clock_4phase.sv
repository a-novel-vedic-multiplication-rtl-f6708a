// tb_qca_clock_4phase: self-checking testbench for qca_clock_4phase.
// After reset zone 0 must be in SWITCH and every zone must step through
// SWITCH, HOLD, RELEASE, RELAX in that order, one phase per cycle, with zone
// k one phase behind zone k-1. zone_latch must be high exactly when a zone is
// in SWITCH. A reset in the middle must bring zone 0 back to SWITCH.
module tb_qca_clock_4phase;
  import qca_pkg::*;
  localparam int unsigned NZ = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  qca_phase_e [NZ-1:0] zone_phase;
  logic [NZ-1:0] zone_latch;
  int checks = 0, failures = 0;
  int cycles = 0;
  int latch_count [NZ];

  qca_clock_4phase #(.N_ZONES(NZ)) dut (
    .clk(clk), .rst_n(rst_n), .zone_phase(zone_phase), .zone_latch(zone_latch)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected phase of zone k, t cycles after reset was released.
  function automatic qca_phase_e expected(int t, int k);
    case (((t - k) % 4 + 4) % 4)
      0: return PH_SWITCH;
      1: return PH_HOLD;
      2: return PH_RELEASE;
      default: return PH_RELAX;
    endcase
  endfunction

  task automatic check_span(int n);
    for (int t = 0; t < n; t++) begin
      for (int k = 0; k < int'(NZ); k++) begin
        checks++;
        if (zone_phase[k] != expected(t, k)) begin
          failures++;
          $display("FAIL t=%0d zone %0d phase %s expected %s", t, k,
                   zone_phase[k].name(), expected(t, k).name());
        end
        checks++;
        if (zone_latch[k] != (expected(t, k) == PH_SWITCH)) begin
          failures++;
          $display("FAIL t=%0d zone %0d latch %b", t, k, zone_latch[k]);
        end
        if (zone_latch[k]) latch_count[k]++;
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    foreach (latch_count[k]) latch_count[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check_span(11);
    // reset again in the middle of a period
    rst_n = 1'b0;
    #1;
    rst_n = 1'b1;
    check_span(16);
    // every zone latched once per four cycles: 3 + 4 times over the two spans
    for (int k = 0; k < int'(NZ); k++) begin
      checks++;
      if (latch_count[k] != (k < 3 ? 7 : 6)) begin
        failures++;
        $display("FAIL zone %0d latched %0d times", k, latch_count[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
