// tb_vedic_mult_2x2_qca: end-to-end self-checking testbench for the
// clock-zoned 2x2 Vedic multiplier at its default parameters.
//
// Every cycle the inputs change. On the cycles where in_sample says the next
// edge samples them, the testbench applies the next pair of its sequence:
// first the four rows of the published results table (00x00, 01x01, 10x10,
// 11x11 -> 0000, 0001, 0100, 1001), then all 16 pairs, then random pairs.
// In all other cycles a and b carry random values that must be ignored.
// Each product is expected on p exactly three edges after its sampling edge
// (four phases, one per zone) and not one edge earlier; the expected value is
// the integer product. The testbench also checks the clock zones' phase
// order, that p_valid stays low until the first pair arrives, and that a
// reset in mid-stream clears p and p_valid. It counts how often each zone
// latched and how often the cross-product carry C1 and the top carry P3 were
// exercised, and fails if any of them never happened.
module tb_vedic_mult_2x2_qca;
  import qca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] a = '0, b = '0;
  logic [3:0] p;
  logic p_valid, in_sample;
  qca_phase_e [NUM_ZONES-1:0] zone_phase;

  vedic_mult_2x2_qca dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .p(p), .p_valid(p_valid),
    .in_sample(in_sample), .zone_phase(zone_phase)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int edges = 0;
  int zone_latches [NUM_ZONES];
  int carry_c1 = 0, carry_p3 = 0, table_rows = 0, resets_mid = 0;

  always @(posedge clk) edges++;

  initial begin
    wait (edges == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at edge %0d: %s", edges, what);
    end
  endtask

  // pair sequence
  localparam int N_SEQ = 4 + 16 + 24;
  logic [3:0] seq [N_SEQ];
  localparam logic [3:0] TABLE_IN  [4] = '{4'b00_00, 4'b01_01, 4'b10_10, 4'b11_11};
  localparam logic [3:0] TABLE_OUT [4] = '{4'b0000, 4'b0001, 4'b0100, 4'b1001};

  // expected[e]: product due at the negedge after edge e (sampled at e-3)
  int unsigned exp_prod [int];
  int due_edge_last = -1;   // latest edge a product is due
  int seq_idx = 0;

  function automatic int unsigned mul(logic [3:0] ab);
    return int'(ab[3:2]) * int'(ab[1:0]);
  endfunction

  task automatic run_pairs(int n);
    int done = 0;
    while (done < n || (due_edge_last >= 0 && edges <= due_edge_last)) begin
      @(negedge clk);
      // phase order: zone k is one phase behind zone k-1
      for (int k = 1; k < int'(NUM_ZONES); k++)
        check(2'(zone_phase[k] + 2'd1) == 2'(zone_phase[k-1]), "zone phase offset");
      for (int k = 0; k < int'(NUM_ZONES); k++)
        if (zone_phase[k] == PH_SWITCH) zone_latches[k]++;
      // output check
      if (exp_prod.exists(edges)) begin
        check(p_valid, "p_valid high once a product has arrived");
        check(int'(p) == int'(exp_prod[edges]),
              $sformatf("p=%b expected %0d", p, exp_prod[edges]));
        if (exp_prod.exists(edges + 1))
          check(int'(p) != int'(exp_prod[edges + 1]) || exp_prod[edges] == exp_prod[edges + 1],
                "product appeared one edge early");
      end
      // drive inputs for the next edge
      if (in_sample && done < n) begin
        logic [3:0] ab = (seq_idx < N_SEQ) ? seq[seq_idx] : 4'($urandom);
        {a, b} = ab;
        if (seq_idx < 4) begin
          check(ab == TABLE_IN[seq_idx] && 4'(mul(ab)) == TABLE_OUT[seq_idx], "table row");
          table_rows++;
        end
        if (ab[3] & ab[0] & ab[2] & ab[1]) carry_c1++;       // A1B0 and A0B1 both 1
        if (mul(ab) >= 8) carry_p3++;
        // sampled at edge edges+1, visible after edge edges+4 up to edges+7
        for (int e = edges + 4; e < edges + 8; e++) exp_prod[e] = mul(ab);
        due_edge_last = edges + 4;
        seq_idx++;
        done++;
      end else begin
        {a, b} = 4'($urandom);
      end
    end
  endtask

  initial begin
    foreach (zone_latches[k]) zone_latches[k] = 0;
    foreach (TABLE_IN[i]) seq[i] = TABLE_IN[i];
    for (int i = 0; i < 16; i++) seq[4 + i] = 4'(i);
    for (int i = 20; i < N_SEQ; i++) seq[i] = 4'($urandom);

    repeat (2) @(posedge clk);
    @(negedge clk);
    check(p_valid == 1'b0 && p == '0, "outputs cleared in reset");
    rst_n = 1'b1;
    // before the first product arrives p_valid must stay low
    repeat (2) begin
      @(negedge clk);
      check(!p_valid, "p_valid low before first product");
    end
    run_pairs(N_SEQ);

    // reset in mid-stream
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    check(!p_valid && p == '0, "reset clears the zones");
    rst_n = 1'b1;
    resets_mid++;
    exp_prod.delete();
    due_edge_last = -1;
    run_pairs(8);

    check(table_rows == 4, "all table rows applied");
    for (int k = 0; k < int'(NUM_ZONES); k++) begin
      check(zone_latches[k] > 0, $sformatf("zone %0d latched", k));
      $display("zone %0d latched %0d times", k, zone_latches[k]);
    end
    check(carry_c1 > 0, "cross-product carry C1 exercised");
    check(carry_p3 > 0, "carry into P3 exercised");
    check(resets_mid > 0, "mid-stream reset exercised");
    $display("pairs=%0d carry_c1=%0d carry_p3=%0d", seq_idx, carry_c1, carry_p3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
