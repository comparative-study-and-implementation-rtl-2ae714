// Half adder: sum = x xor y, carry = x and y. Purely combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
