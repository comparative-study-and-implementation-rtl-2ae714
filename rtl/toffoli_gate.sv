// Toffoli (CCNOT) gate: 3x3 reversible gate, quantum cost 5.
//
// P = A, Q = B, R = AB xor C. With C tied to 0 it yields the AND of A and B
// on R while passing both operands on, which is how the multipliers use it
// to form partial products. Purely combinational; no clock.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
