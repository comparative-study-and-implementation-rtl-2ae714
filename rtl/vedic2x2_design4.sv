// Reversible 2x2 Vedic multiplier, design 4: one BVPPG gate, two Peres
// gates, one NFT gate and one Feynman gate.
//
// The BVPPG gate forms a0b0 and a0b1 and passes b0 and b1 on (I2, I3). PGa
// forms a1b0 and passes a1 on (I4); PGb forms a1b1. A Feynman gate adds the
// crosswise products to give P1; their carry is never formed. Instead one
// NFT gate with A = 0, B = a0b0, C = a1b1 gives all three remaining digits:
//   P = a0b0 = P0,  Q = (not a0b0) a1b1 = a1b1 xor a0a1b0b1 = P2,
//   R = a0b0 a1b1 = P3.
//
// Netlist (ancillary inputs are constant 0):
//   BVPPG(a0, b0, 0, b1, 0) -> G1, I2, a0b0, I3, a0b1
//   PGa(a1, I2, 0)          -> I4, G2, a1b0
//   FG(a0b1, a1b0)          -> G5, P1
//   PGb(I4, I3, 0)          -> G3, G4, a1b1
//   NFT(0, a0b0, a1b1)      -> P0, P2, P3
// Five gates, five garbage outputs, quantum cost 24, as published. The
// netlist has five constant inputs; the published count for this circuit is
// six. Interface: operands a, b; product p; garbage bit k-1 is Gk. Purely
// combinational.
module vedic2x2_design4 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p,
  output logic [4:0] garbage
);
  import rev_pkg::*;

  localparam metrics_t METRICS = tally(0, 2, 1, 1, 1, 0, 5, $bits(garbage));

  logic i2, i3, i4, a0b0, a0b1, a1b0, a1b1;

  bvppg_gate   u_bv  (.a(a[0]), .b(b[0]), .c(1'b0), .d(b[1]), .e(1'b0),
                      .p(garbage[0]), .q(i2), .r(a0b0), .s(i3), .t(a0b1));
  peres_gate   u_pga (.a(a[1]), .b(i2),   .c(1'b0), .p(i4),         .q(garbage[1]), .r(a1b0));
  feynman_gate u_fg  (.a(a0b1), .b(a1b0),           .p(garbage[4]), .q(p[1]));
  peres_gate   u_pgb (.a(i4),   .b(i3),   .c(1'b0), .p(garbage[2]), .q(garbage[3]), .r(a1b1));
  nft_gate     u_nft (.a(1'b0), .b(a0b0), .c(a1b1), .p(p[0]),       .q(p[2]),       .r(p[3]));
endmodule
