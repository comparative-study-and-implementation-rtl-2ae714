// NFT gate: 3x3 parity-preserving reversible gate, quantum cost 5.
//
// P = A xor B, Q = (not B)C xor A(not C), R = BC xor A(not C).
// The parity of the outputs equals the parity of the inputs. With A tied to
// 0 it gives B on P, (not B)C on Q and BC on R, which design 4 uses to form
// P0, P2 and P3 of the product in one gate. The Q and R equations are those
// of the published NFT gate; they are also the only reading under which
// design 4 multiplies correctly. Purely combinational.
module nft_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a ^ b;
  assign q = (~b & c) ^ (a & ~c);
  assign r = (b & c) ^ (a & ~c);
endmodule
