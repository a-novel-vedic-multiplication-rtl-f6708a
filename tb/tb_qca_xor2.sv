// tb_qca_xor2: exhaustive self-checking testbench for qca_xor2.
// Applies every input combination and compares the output with the XOR of the two inputs,
// worked out here from the truth table rather than from the gate's equation.
module tb_qca_xor2;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_xor2 dut (.a(a), .b(b), .y(y));

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
      exp_y = (int'(a) + int'(b) == 1);
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
