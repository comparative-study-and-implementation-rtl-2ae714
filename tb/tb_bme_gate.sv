// Self-checking testbench for bme_gate: P = A, Q = AB xor C, R = AD xor C, S = AB xor C xor D.
// Applies all 2^4 input patterns, compares every output with the gate's
// equation worked out here in integer arithmetic (xor as a sum mod 2, and as
// a product). The equations as published are not a bijection (with A = 0,
// Q and R are both C), so instead of a reversibility check the testbench
// counts the distinct output patterns and expects the 12 those equations
// give: 8 with A = 1 and 4 with A = 0. The gate is combinational; one time
// unit is allowed for each pattern to settle.
module tb_bme_gate;
  logic a, b, c, d;
  logic p, q, r, s;
  int checks = 0;
  int failures = 0;
  bit seen [2**4];
  int distinct;

  bme_gate dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 2**4; i++) begin
      int ia, ib, ic, id, ie;
      logic [4-1:0] exp_out, got_out;
      {a, b, c, d} = i[4-1:0];
      ia = int'(a); ib = int'(b);
      ic = int'(c); id = int'(d);
      exp_out = {1'(ia), 1'((ia * ib + ic) % 2), 1'((ia * id + ic) % 2), 1'((ia * ib + ic + id) % 2)};
      #1;
      got_out = {p, q, r, s};
      checks++;
      if (got_out !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", i[4-1:0], got_out, exp_out);
      end
      seen[got_out] = 1'b1;
    end
    distinct = 0;
    foreach (seen[k]) distinct += int'(seen[k]);
    checks++;
    if (distinct != 12) begin
      failures++;
      $display("FAIL %0d distinct output patterns, expected 12", distinct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
