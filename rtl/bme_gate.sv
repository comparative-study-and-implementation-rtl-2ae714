// BME gate: 4x4 reversible partial-product generator, quantum cost 6.
//
// P = A, Q = AB xor C, R = AD xor C, S = AB xor C xor D. With C tied to 0 it
// forms the two partial products A*B (on Q) and A*D (on R). Purely
// combinational.
module bme_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = (a & b) ^ c;
  assign r = (a & d) ^ c;
  assign s = (a & b) ^ c ^ d;
endmodule
