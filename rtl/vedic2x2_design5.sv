// Reversible 2x2 Vedic multiplier, design 5: one BME gate, three Peres gates
// and one Toffoli gate.
//
// The BME gate forms a0b0 (= P0) and a0b1 in one step. A Peres gate forms
// a1b0 and passes a1 on to a Toffoli gate, which forms a1b1. Two Peres gates
// then act as the two half adders of the conventional multiplier: PG1 adds
// the crosswise products (P1, carry C1), PG2 adds C1 to a1b1 (P2, P3). The
// operands b0 and b1 each enter two gates directly.
//
// Netlist (ancillary inputs are constant 0):
//   BME(a0, b0, 0, b1)    -> G1, P0, a0b1, G2
//   PGa(a1, b0, 0)        -> a1, G3, a1b0
//   TOF(a1, b1, 0)        -> G4, G5, a1b1
//   PG1(a0b1, a1b0, 0)    -> G6, P1, C1
//   PG2(C1, a1b1, 0)      -> G7, P2, P3
// Five ancillary inputs, seven garbage outputs, five gates, quantum cost 23.
// Interface: operands a, b; product p; garbage bit k-1 is Gk. Purely
// combinational.
module vedic2x2_design5 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p,
  output logic [6:0] garbage
);
  import rev_pkg::*;

  localparam metrics_t METRICS = tally(1, 3, 0, 0, 0, 1, 5, $bits(garbage));

  logic a0b1, pga_a1, a1b0, a1b1, c1;

  bme_gate     u_bme (.a(a[0]), .b(b[0]), .c(1'b0), .d(b[1]),
                      .p(garbage[0]), .q(p[0]), .r(a0b1), .s(garbage[1]));
  peres_gate   u_pga (.a(a[1]),   .b(b[0]), .c(1'b0), .p(pga_a1),     .q(garbage[2]), .r(a1b0));
  toffoli_gate u_tof (.a(pga_a1), .b(b[1]), .c(1'b0), .p(garbage[3]), .q(garbage[4]), .r(a1b1));
  peres_gate   u_pg1 (.a(a0b1),   .b(a1b0), .c(1'b0), .p(garbage[5]), .q(p[1]),       .r(c1));
  peres_gate   u_pg2 (.a(c1),     .b(a1b1), .c(1'b0), .p(garbage[6]), .q(p[2]),       .r(p[3]));
endmodule
