// Self-checking testbench for bvppg_gate: P = A, Q = B, R = AB xor C, S = D, T = AD xor E.
// Applies all 2^5 input patterns, compares every output with the gate's
// equation worked out here in integer arithmetic (xor as a sum mod 2, and as
// a product), and checks that the gate is reversible: the 2^5 output
// patterns must all differ. The gate is combinational; one time unit is
// allowed for each pattern to settle.
module tb_bvppg_gate;
  logic a, b, c, d, e;
  logic p, q, r, s, t;
  int checks = 0;
  int failures = 0;
  bit seen [2**5];
  int distinct;

  bvppg_gate dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 2**5; i++) begin
      int ia, ib, ic, id, ie;
      logic [5-1:0] exp_out, got_out;
      {a, b, c, d, e} = i[5-1:0];
      ia = int'(a); ib = int'(b);
      ic = int'(c); id = int'(d); ie = int'(e);
      exp_out = {1'(ia), 1'(ib), 1'((ia * ib + ic) % 2), 1'(id), 1'((ia * id + ie) % 2)};
      #1;
      got_out = {p, q, r, s, t};
      checks++;
      if (got_out !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", i[5-1:0], got_out, exp_out);
      end
      seen[got_out] = 1'b1;
    end
    distinct = 0;
    foreach (seen[k]) distinct += int'(seen[k]);
    checks++;
    if (distinct != 2**5) begin
      failures++;
      $display("FAIL only %0d distinct output patterns: not reversible", distinct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
