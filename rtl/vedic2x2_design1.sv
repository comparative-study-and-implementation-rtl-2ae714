// Reversible 2x2 Vedic multiplier, design 1: four Toffoli and two Peres gates.
//
// Three Toffoli gates in a chain form the partial products a0b0 (= P0), a0b1
// and a1b0; each passes its operands on, so no input fans out. A fourth
// Toffoli forms a1b1 from the operand copies. Two Peres gates then act as the
// two half adders of the conventional multiplier: the first adds the
// crosswise products (P1, carry C1), the second adds C1 to a1b1 (P2, P3).
//
// Netlist (ancillary inputs are constant 0):
//   T1(a0, b0, 0)        -> a0, b0, P0
//   T2(b1, a0, 0)        -> b1, G1, a0b1
//   T3(a1, b0, 0)        -> a1, G2, a1b0
//   T4(b1, a1, 0)        -> G3, G4, a1b1
//   PG1(a0b1, a1b0, 0)   -> G5, P1, C1
//   PG2(a1b1, C1, 0)     -> G6, P2, P3
// Six ancillary inputs, six garbage outputs, six gates, quantum cost 28, as
// published for this circuit. Interface: operands a, b; product p; garbage
// bit k-1 is Gk. Purely combinational.
module vedic2x2_design1 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p,
  output logic [5:0] garbage
);
  import rev_pkg::*;

  localparam metrics_t METRICS = tally(4, 2, 0, 0, 0, 0, 6, $bits(garbage));

  logic t1_a0, t1_b0, t2_b1, t3_a1;
  logic a0b1, a1b0, a1b1, c1;

  toffoli_gate u_t1 (.a(a[0]),  .b(b[0]),  .c(1'b0), .p(t1_a0),      .q(t1_b0),      .r(p[0]));
  toffoli_gate u_t2 (.a(b[1]),  .b(t1_a0), .c(1'b0), .p(t2_b1),      .q(garbage[0]), .r(a0b1));
  toffoli_gate u_t3 (.a(a[1]),  .b(t1_b0), .c(1'b0), .p(t3_a1),      .q(garbage[1]), .r(a1b0));
  toffoli_gate u_t4 (.a(t2_b1), .b(t3_a1), .c(1'b0), .p(garbage[2]), .q(garbage[3]), .r(a1b1));
  peres_gate   u_pg1(.a(a0b1),  .b(a1b0),  .c(1'b0), .p(garbage[4]), .q(p[1]),       .r(c1));
  peres_gate   u_pg2(.a(a1b1),  .b(c1),    .c(1'b0), .p(garbage[5]), .q(p[2]),       .r(p[3]));
endmodule
