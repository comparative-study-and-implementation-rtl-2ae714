// Self-checking testbench for vedic2x2_design2: five Peres gates and one Feynman gate.
//
// Applies all 16 operand pairs. For each it checks the product against the
// integer product a*b and the garbage outputs against the values the
// circuit's netlist gives each garbage line (G1 = a0, G2 = a0^b0, G3 = a1, G4 = a1^b1, G5 = a1, G6 = a1^b0, G7 = a0b0^a1b1, G8 = a0, G9 = a0^b1), worked out here from
// the operand bits. It also checks the circuit's figures of merit, which the
// module computes from the gates it instantiates, against the published
// values for this circuit: 6 gates, 4 ancillary inputs, 9 garbage outputs, quantum cost 21. It counts how often the carry of
// the crosswise products (C1) is set and fails if that never happens.
module tb_vedic2x2_design2;
  logic [1:0] a, b;
  logic [3:0] p;
  logic [8:0] garbage;
  int checks = 0;
  int failures = 0;
  int carry_cases = 0;

  vedic2x2_design2 dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_metric(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin : stimulus
    check_metric("gates",           dut.METRICS.gates,   6);
    check_metric("ancillary inputs", dut.METRICS.ancilla, 4);
    check_metric("garbage outputs",  dut.METRICS.garbage, 9);
    check_metric("quantum cost",     dut.METRICS.qcost,   21);
    for (int i = 0; i < 16; i++) begin
      logic a0, a1, b0, b1, c1;
      logic [8:0] exp_g;
      {a, b} = i[3:0];
      {a1, a0} = a;
      {b1, b0} = b;
      c1 = (a1 & b0) & (a0 & b1);
      if (c1) carry_cases++;
      exp_g = {a0 ^ b1, a0, (a0 & b0) ^ (a1 & b1), a1 ^ b0, a1, a1 ^ b1, a1, a0 ^ b0, a0};
      #1;
      checks++;
      if (int'(p) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL %0d * %0d gave %0d", a, b, p);
      end
      checks++;
      if (garbage !== exp_g) begin
        failures++;
        $display("FAIL a=%0d b=%0d garbage=%b expected %b", a, b, garbage, exp_g);
      end
    end
    checks++;
    if (carry_cases == 0) begin
      failures++;
      $display("FAIL the crosswise carry was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
