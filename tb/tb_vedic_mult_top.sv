// End-to-end testbench for vedic_mult_top, at its default (and only)
// configuration.
//
// First pass: every one of the 16 operand pairs is applied to all six
// multipliers at once, and each product is checked against the integer
// product a*b. Second pass: 400 rounds in which each multiplier gets its own
// random operands, to show that the six circuits are independent (no
// crossed wires between them in the top). The testbench counts how often
// each case of the Urdhva Tiryagbhyam addition occurs: the crosswise carry
// C1 into the top digit, a middle digit formed from one crosswise product
// alone, and a zero product. A case that never occurs counts as a failure.
module tb_vedic_mult_top;
  logic [1:0] a_conv, b_conv, a_d1, b_d1, a_d2, b_d2, a_d3, b_d3, a_d4, b_d4, a_d5, b_d5;
  logic [3:0] p_conv, p_d1, p_d2, p_d3, p_d4, p_d5;
  logic [5:0] g_d1;
  logic [8:0] g_d2;
  logic [4:0] g_d3, g_d4;
  logic [6:0] g_d5;

  int checks = 0;
  int failures = 0;
  int n_carry = 0;
  int n_single_cross = 0;
  int n_zero = 0;

  vedic_mult_top dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(string name, logic [1:0] a, logic [1:0] b, logic [3:0] p);
    checks++;
    if (int'(p) != int'(a) * int'(b)) begin
      failures++;
      $display("FAIL %s: %0d * %0d gave %0d", name, a, b, p);
    end
    if (a[1] & b[0] & a[0] & b[1]) n_carry++;
    if ((a[1] & b[0]) != (a[0] & b[1])) n_single_cross++;
    if (int'(a) * int'(b) == 0) n_zero++;
  endtask

  task automatic check_all();
    check_one("conventional", a_conv, b_conv, p_conv);
    check_one("design1", a_d1, b_d1, p_d1);
    check_one("design2", a_d2, b_d2, p_d2);
    check_one("design3", a_d3, b_d3, p_d3);
    check_one("design4", a_d4, b_d4, p_d4);
    check_one("design5", a_d5, b_d5, p_d5);
  endtask

  initial begin : stimulus
    for (int i = 0; i < 16; i++) begin
      {a_conv, b_conv} = i[3:0];
      {a_d1, b_d1} = i[3:0];
      {a_d2, b_d2} = i[3:0];
      {a_d3, b_d3} = i[3:0];
      {a_d4, b_d4} = i[3:0];
      {a_d5, b_d5} = i[3:0];
      #1;
      check_all();
    end
    for (int r = 0; r < 400; r++) begin
      {a_conv, b_conv} = 4'($urandom);
      {a_d1, b_d1} = 4'($urandom);
      {a_d2, b_d2} = 4'($urandom);
      {a_d3, b_d3} = 4'($urandom);
      {a_d4, b_d4} = 4'($urandom);
      {a_d5, b_d5} = 4'($urandom);
      #1;
      check_all();
    end
    $display("crosswise carry: %0d, single crosswise product: %0d, zero product: %0d",
             n_carry, n_single_cross, n_zero);
    checks++;
    if (n_carry == 0 || n_single_cross == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a case of the addition was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
