// Self-checking testbench for feynman_gate: P = A, Q = A xor B.
// Applies all 2^2 input patterns, compares every output with the gate's
// equation worked out here in integer arithmetic (xor as a sum mod 2, and as
// a product), and checks that the gate is reversible: the 2^2 output
// patterns must all differ. The gate is combinational; one time unit is
// allowed for each pattern to settle.
module tb_feynman_gate;
  logic a, b;
  logic p, q;
  int checks = 0;
  int failures = 0;
  bit seen [2**2];
  int distinct;

  feynman_gate dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 2**2; i++) begin
      int ia, ib, ic, id, ie;
      logic [2-1:0] exp_out, got_out;
      {a, b} = i[2-1:0];
      ia = int'(a); ib = int'(b);
      exp_out = {1'(ia), 1'((ia + ib) % 2)};
      #1;
      got_out = {p, q};
      checks++;
      if (got_out !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", i[2-1:0], got_out, exp_out);
      end
      seen[got_out] = 1'b1;
    end
    distinct = 0;
    foreach (seen[k]) distinct += int'(seen[k]);
    checks++;
    if (distinct != 2**2) begin
      failures++;
      $display("FAIL only %0d distinct output patterns: not reversible", distinct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
