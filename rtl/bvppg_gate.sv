// BVPPG gate: 5x5 reversible partial-product generator, quantum cost 10.
//
// P = A, Q = B, R = AB xor C, S = D, T = AD xor E. With C and E tied to 0 it
// forms two partial products that share the operand A (A*B on R and A*D on
// T) while passing B and D on for later use, so no input needs to fan out.
// Purely combinational.
module bvppg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
  assign s = d;
  assign t = (a & d) ^ e;
endmodule
