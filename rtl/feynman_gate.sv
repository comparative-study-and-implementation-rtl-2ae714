// Feynman (CNOT) gate: 2x2 reversible gate, quantum cost 1.
//
// P = A, Q = A xor B. With B tied to 0 it copies A, which is the legal way
// to fan a signal out in a reversible circuit. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
