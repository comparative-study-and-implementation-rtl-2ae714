// Conventional (irreversible) 2x2 Vedic multiplier.
//
// Urdhva Tiryagbhyam, "vertically and crosswise": the vertical products give
// the end digits (P0 = a0b0) and feed the top column (a1b1), the crosswise
// products a1b0 and a0b1 are added for the middle digit. Four AND gates form
// the partial products and two half adders add them:
//   P0 = a0b0,  P1 = a1b0 xor a0b1,  C1 = a1b0 and a0b1,
//   P2 = a1b1 xor C1,  P3 = a1b1 and C1.
// Six AND gates and two XOR gates in all.
// This is the reference the reversible designs reproduce. Purely
// combinational: the product is valid one gate-path after the operands.
module vedic2x2_conventional (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1, c1;

  assign a0b0 = a[0] & b[0];
  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];

  half_adder u_ha1 (.x(a1b0), .y(a0b1), .s(p[1]), .c(c1));
  half_adder u_ha2 (.x(a1b1), .y(c1),   .s(p[2]), .c(p[3]));

  assign p[0] = a0b0;
endmodule
