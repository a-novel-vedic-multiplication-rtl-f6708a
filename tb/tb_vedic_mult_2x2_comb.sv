// tb_vedic_mult_2x2_comb: self-checking testbench for the multiplier built
// without clock zones (ZONED = 0), the purely combinational form. For all 16
// operand pairs p must equal the integer product in the same cycle, with
// p_valid and in_sample constantly high.
module tb_vedic_mult_2x2_comb;
  import qca_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [1:0] a, b;
  logic [3:0] p;
  logic p_valid, in_sample;
  qca_phase_e [NUM_ZONES-1:0] zone_phase;
  int checks = 0, failures = 0;

  vedic_mult_2x2_qca #(.ZONED(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .p(p), .p_valid(p_valid),
    .in_sample(in_sample), .zone_phase(zone_phase)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #3;
      checks++;
      if (int'(p) != int'(a) * int'(b) || !p_valid || !in_sample) begin
        failures++;
        $display("FAIL a=%0d b=%0d p=%0d valid=%b", a, b, p, p_valid);
      end
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
