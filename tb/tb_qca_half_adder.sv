// tb_qca_half_adder: exhaustive self-checking testbench for qca_half_adder.
// For all four operand pairs, {carry, sum} must equal the integer sum a + b.
module tb_qca_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  qca_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int total;
      {a, b} = 2'(v);
      #1;
      total = int'(a) + int'(b);
      checks++;
      if ({carry, sum} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%b b=%b -> carry=%b sum=%b, expected %0d", a, b, carry, sum, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
