// Self-checking testbench for vedic2x2_conventional: all 16 operand pairs,
// each product compared with the integer product a*b. It counts how often
// the carry of the crosswise products (C1) is set and fails if that never
// happens.
module tb_vedic2x2_conventional;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0;
  int failures = 0;
  int carry_cases = 0;

  vedic2x2_conventional dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 16; i++) begin
      {a, b} = i[3:0];
      if (a[1] & b[0] & a[0] & b[1]) carry_cases++;
      #1;
      checks++;
      if (int'(p) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL %0d * %0d gave %0d", a, b, p);
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
