// tb_qca_inv: exhaustive self-checking testbench for qca_inv.
// Applies every input combination and compares the output with the complement of the input,
// worked out here from the truth table rather than from the gate's equation.
module tb_qca_inv;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_inv dut (.a(a), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_y;
      int ones;
      {a, b, c} = 3'(v);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      exp_y = (int'(a) == 0);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b y=%b expected %b", a, b, c, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
