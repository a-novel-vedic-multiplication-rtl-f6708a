// tb_vedic_pp_gen: exhaustive self-checking testbench for vedic_pp_gen.
// For all 16 operand pairs, each partial product must be the product of the
// two bits it pairs; the weighted sum p0 + 2*(x1 + x2) + 4*x3 must also equal
// the integer product a * b.
module tb_vedic_pp_gen;
  import qca_pkg::*;
  logic [1:0] a, b;
  pp_t pp;
  int checks = 0, failures = 0;

  vedic_pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ai[2], bi[2], weighted;
      {a, b} = 4'(v);
      #1;
      for (int i = 0; i < 2; i++) begin
        ai[i] = int'(a[i]);
        bi[i] = int'(b[i]);
      end
      checks++;
      if (int'(pp.p0) != ai[0] * bi[0] || int'(pp.x1) != ai[1] * bi[0] ||
          int'(pp.x2) != ai[0] * bi[1] || int'(pp.x3) != ai[1] * bi[1]) begin
        failures++;
        $display("FAIL a=%b b=%b pp=%b", a, b, pp);
      end
      weighted = int'(pp.p0) + 2 * (int'(pp.x1) + int'(pp.x2)) + 4 * int'(pp.x3);
      checks++;
      if (weighted != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b weighted sum %0d", a, b, weighted);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
