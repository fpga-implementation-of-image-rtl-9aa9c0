// peres_gate_inv: inverse of the 3x3 Peres gate, first stage of each
// decryption nibble.
//
// From P = A, Q = A ^ B, Z = (A & B) ^ C it recovers
//   A = P, B = P ^ Q, C = Z ^ (A & B).
// The Peres gate is not its own inverse, so the decryption side needs this
// separate gate. The equations are this design's own, derived from the forward
// gate. Purely combinational, no clock.
module peres_gate_inv (
  input  logic p,
  input  logic q,
  input  logic z,
  output logic a,
  output logic b,
  output logic c
);
  assign a = p;
  assign b = p ^ q;
  assign c = z ^ (a & b);
endmodule
