// Side-by-side collection of 2x2 Vedic multipliers.
//
// Holds the conventional 2x2 Urdhva Tiryagbhyam multiplier (AND gates and two
// half adders) and the five published reversible versions of it, which
// differ only in the reversible gates they are built from and so in their
// gate count, constant inputs, garbage outputs and quantum cost. The
// multipliers are alternatives, not parts of one datapath, so each has its
// own operand inputs, its product output and, for the reversible ones, its
// garbage outputs. The reversible ancillary inputs are constant 0 inside each
// design and are not brought out. Every product is combinational: it follows
// its operands with no clock and no latency in cycles.
module vedic_mult_top (
  input  logic [1:0] a_conv, b_conv,
  output logic [3:0] p_conv,
  input  logic [1:0] a_d1, b_d1,
  output logic [3:0] p_d1,
  output logic [5:0] g_d1,
  input  logic [1:0] a_d2, b_d2,
  output logic [3:0] p_d2,
  output logic [8:0] g_d2,
  input  logic [1:0] a_d3, b_d3,
  output logic [3:0] p_d3,
  output logic [4:0] g_d3,
  input  logic [1:0] a_d4, b_d4,
  output logic [3:0] p_d4,
  output logic [4:0] g_d4,
  input  logic [1:0] a_d5, b_d5,
  output logic [3:0] p_d5,
  output logic [6:0] g_d5
);
  vedic2x2_conventional u_conv (.a(a_conv), .b(b_conv), .p(p_conv));
  vedic2x2_design1      u_d1   (.a(a_d1), .b(b_d1), .p(p_d1), .garbage(g_d1));
  vedic2x2_design2      u_d2   (.a(a_d2), .b(b_d2), .p(p_d2), .garbage(g_d2));
  vedic2x2_design3      u_d3   (.a(a_d3), .b(b_d3), .p(p_d3), .garbage(g_d3));
  vedic2x2_design4      u_d4   (.a(a_d4), .b(b_d4), .p(p_d4), .garbage(g_d4));
  vedic2x2_design5      u_d5   (.a(a_d5), .b(b_d5), .p(p_d5), .garbage(g_d5));
endmodule
