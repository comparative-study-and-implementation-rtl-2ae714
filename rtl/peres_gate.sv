// Peres gate (new Toffoli gate): 3x3 reversible gate, quantum cost 4.
//
// P = A, Q = A xor B, R = AB xor C. With C tied to 0 it is a reversible half
// adder: Q is the sum and R the carry of A and B. It is the cheapest 3x3
// gate the multipliers use. Purely combinational; no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
