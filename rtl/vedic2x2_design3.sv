// Reversible 2x2 Vedic multiplier, design 3: one BVPPG gate, three Peres
// gates and one Feynman gate.
//
// The BVPPG gate forms a0b0 (= P0) and a0b1 in one step and passes b0 and b1
// on (lines I1, I2), so no operand fans out. PGa forms a1b0 and passes a1 on
// (I3); PGb forms a1b1. PGc is the half adder of the crosswise products (P1,
// carry C1). Because C1 = a0a1b0b1 already implies a1b1, P3 = C1 and only a
// Feynman gate is needed to give P2 = a1b1 xor C1.
//
// Netlist (ancillary inputs are constant 0):
//   BVPPG(a0, b0, 0, b1, 0) -> G1, I1, P0, I2, a0b1
//   PGa(a1, I1, 0)          -> I3, G2, a1b0
//   PGb(I3, I2, 0)          -> G3, G4, a1b1
//   PGc(a0b1, a1b0, 0)      -> G5, P1, C1
//   FG(C1, a1b1)            -> P3, P2
// Five ancillary inputs, five garbage outputs, five gates, quantum cost 23:
// the least garbage of the published designs without fan-out. Interface:
// operands a, b; product p; garbage bit k-1 is Gk. Purely combinational.
module vedic2x2_design3 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p,
  output logic [4:0] garbage
);
  import rev_pkg::*;

  localparam metrics_t METRICS = tally(0, 3, 1, 0, 1, 0, 5, $bits(garbage));

  logic i1, i2, i3, a0b1, a1b0, a1b1, c1;

  bvppg_gate   u_bv  (.a(a[0]), .b(b[0]), .c(1'b0), .d(b[1]), .e(1'b0),
                      .p(garbage[0]), .q(i1), .r(p[0]), .s(i2), .t(a0b1));
  peres_gate   u_pga (.a(a[1]), .b(i1),   .c(1'b0), .p(i3),         .q(garbage[1]), .r(a1b0));
  peres_gate   u_pgb (.a(i3),   .b(i2),   .c(1'b0), .p(garbage[2]), .q(garbage[3]), .r(a1b1));
  peres_gate   u_pgc (.a(a0b1), .b(a1b0), .c(1'b0), .p(garbage[4]), .q(p[1]),       .r(c1));
  feynman_gate u_fg  (.a(c1),   .b(a1b1),           .p(p[3]),       .q(p[2]));
endmodule
