// Reversible 2x2 Vedic multiplier, design 2: five Peres gates and one
// Feynman (CNOT) gate.
//
// This circuit uses the identities C1 = a0a1b0b1 and hence
//   P3 = a0b0 . a1b1,   P2 = a1b1 xor P3,   P1 = a0b1 xor a1b0.
// PG1 and PG2 form the vertical products a0b0 and a1b1, PG3 multiplies them
// (P3) and passes a0b0 through as P0, and the CNOT folds P3 into a1b1 to give
// P2. The middle digit comes from PG4, which forms a1b0, and PG5, whose third
// input accumulates a0b1 onto it. The primary inputs are used more than once
// and a1b1 drives both PG3 and the CNOT: that fan-out is why this circuit,
// although the cheapest, is not a legal reversible circuit. It is built here
// exactly as published.
//
// Netlist (ancillary inputs are constant 0):
//   PG1(a0, b0, 0)         -> G1, G2, a0b0
//   PG2(a1, b1, 0)         -> G3, G4, a1b1
//   PG3(a0b0, a1b1, 0)     -> P0, G7, P3'
//   CNOT(P3', a1b1)        -> P3, P2
//   PG4(a1, b0, 0)         -> G5, G6, a1b0
//   PG5(a0, b1, a1b0)      -> G8, G9, P1
// Four ancillary inputs, nine garbage outputs, six gates, quantum cost 21.
// Interface: operands a, b; product p; garbage bit k-1 is Gk. Purely
// combinational.
module vedic2x2_design2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p,
  output logic [8:0] garbage
);
  import rev_pkg::*;

  localparam metrics_t METRICS = tally(0, 5, 1, 0, 0, 0, 4, $bits(garbage));

  logic a0b0, a1b1, a1b0, p3_pre;

  peres_gate   u_pg1 (.a(a[0]), .b(b[0]), .c(1'b0), .p(garbage[0]), .q(garbage[1]), .r(a0b0));
  peres_gate   u_pg2 (.a(a[1]), .b(b[1]), .c(1'b0), .p(garbage[2]), .q(garbage[3]), .r(a1b1));
  peres_gate   u_pg3 (.a(a0b0), .b(a1b1), .c(1'b0), .p(p[0]),       .q(garbage[6]), .r(p3_pre));
  feynman_gate u_cnot(.a(p3_pre), .b(a1b1),         .p(p[3]),       .q(p[2]));
  peres_gate   u_pg4 (.a(a[1]), .b(b[0]), .c(1'b0), .p(garbage[4]), .q(garbage[5]), .r(a1b0));
  peres_gate   u_pg5 (.a(a[0]), .b(b[1]), .c(a1b0), .p(garbage[7]), .q(garbage[8]), .r(p[1]));
endmodule
