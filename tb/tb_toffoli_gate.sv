// Self-checking testbench for toffoli_gate: P = A, Q = B, R = AB xor C.
// Applies all 2^3 input patterns, compares every output with the gate's
// equation worked out here in integer arithmetic (xor as a sum mod 2, and as
// a product), and checks that the gate is reversible: the 2^3 output
// patterns must all differ. The gate is combinational; one time unit is
// allowed for each pattern to settle.
module tb_toffoli_gate;
  logic a, b, c;
  logic p, q, r;
  int checks = 0;
  int failures = 0;
  bit seen [2**3];
  int distinct;

  toffoli_gate dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 2**3; i++) begin
      int ia, ib, ic, id, ie;
      logic [3-1:0] exp_out, got_out;
      {a, b, c} = i[3-1:0];
      ia = int'(a); ib = int'(b);
      ic = int'(c);
      exp_out = {1'(ia), 1'(ib), 1'((ia * ib + ic) % 2)};
      #1;
      got_out = {p, q, r};
      checks++;
      if (got_out !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", i[3-1:0], got_out, exp_out);
      end
      seen[got_out] = 1'b1;
    end
    distinct = 0;
    foreach (seen[k]) distinct += int'(seen[k]);
    checks++;
    if (distinct != 2**3) begin
      failures++;
      $display("FAIL only %0d distinct output patterns: not reversible", distinct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
